// Testbench of bsc (bit-stream controller). Four lanes push 0..4 bytes
// and sometimes an end mark per cycle, while the consumer's ready is
// random and at times low for long stretches. Each lane tags its bytes
// with its own bit-plane number, so the testbench can check that every
// lane's bytes and end marks come out complete and in order. Pushes are
// held back while the controller raises stall, as the EBC does; the
// testbench checks that stall did happen, that no FIFO overflowed (an
// assertion in the DUT) and that the controller is empty at the end.
module tb_bsc;
  import jp2k_pkg::*;
  localparam int NL = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] lane_n [NL];
  logic [7:0] lane_byte [NL][4];
  logic       lane_eop [NL];
  logic [3:0] lane_k [NL];
  logic       stall, out_valid, out_ready, out_eop, empty;
  logic [3:0] out_k;
  logic [7:0] out_byte;

  bsc dut (.*);

  int checks = 0, failures = 0, n_stall = 0, n_out = 0;
  int exp_q [NL][$];     // expected entries: 256 = end mark, else the byte

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int l = 0; l < NL; l++) begin
      lane_n[l] = 0; lane_eop[l] = 0; lane_k[l] = 4'(l);
      for (int i = 0; i < 4; i++) lane_byte[l][i] = 0;
    end
    out_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      bit pushing;
      int phase;
      phase = (cyc / 1000) % 3;     // 0: fast consumer, 1: slow, 2: stopped now and then
      pushing = (cyc < 19000);
      if (stall) n_stall++;
      for (int l = 0; l < NL; l++) begin
        if (pushing && !stall) begin
          lane_n[l]   = 3'($urandom_range(0, 4));
          lane_eop[l] = ($urandom_range(0, 9) == 0);
        end else begin
          lane_n[l]   = 0;
          lane_eop[l] = 0;
        end
        for (int i = 0; i < 4; i++) lane_byte[l][i] = 8'($urandom);
        for (int i = 0; i < int'(lane_n[l]); i++) exp_q[l].push_back(int'(lane_byte[l][i]));
        if (lane_eop[l]) exp_q[l].push_back(256);
      end
      case (phase)
        0: out_ready = 1;
        1: out_ready = ($urandom_range(0, 99) < 30);
        default: out_ready = ($urandom_range(0, 99) < 70) && ((cyc % 200) > 60);
      endcase
      #1;
      if (out_valid && out_ready) begin
        int l, e;
        l = int'(out_k);
        n_out++;
        if (l < NL && exp_q[l].size() > 0) begin
          e = exp_q[l].pop_front();
          check(out_eop ? (e == 256) : (e == int'(out_byte)),
                $sformatf("lane %0d: got %0d/%b expected %0d", l, out_byte, out_eop, e));
        end else check(0, "output with nothing expected");
      end
      @(negedge clk);
    end
    for (int l = 0; l < NL; l++) lane_n[l] = 0;
    out_ready = 1;
    repeat (2000) begin
      #1;
      if (out_valid) begin
        int l, e;
        l = int'(out_k);
        if (l < NL && exp_q[l].size() > 0) begin
          e = exp_q[l].pop_front();
          check(out_eop ? (e == 256) : (e == int'(out_byte)), $sformatf("drain lane %0d", l));
        end else check(0, "output with nothing expected");
      end
      @(negedge clk);
    end
    for (int l = 0; l < NL; l++) check(exp_q[l].size() == 0, $sformatf("lane %0d: %0d entries lost", l, exp_q[l].size()));
    check(empty, "not empty at the end");
    check(n_stall > 0, "stall never raised");
    $display("outputs %0d, stall cycles %0d", n_out, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
