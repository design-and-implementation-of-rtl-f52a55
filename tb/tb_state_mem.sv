// Testbench of state_mem (significance, refinement and sign indicators of
// a code-block between rounds). A 16x16 instance with 20 read ports is
// written four samples at a time at random addresses and read on every
// port at random addresses each cycle; reads are compared with a model
// array. The clear input is exercised in the middle of the run.
module tb_state_mem;
  localparam int CB = 16;
  localparam int N  = CB * CB;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       clr, we;
  logic [7:0] wr_addr;
  logic [3:0] wr_sig, wr_ref, wr_sgn;
  logic [7:0] rd_addr [20];
  logic       rd_sig [20], rd_ref [20], rd_sgn [20];

  state_mem #(.CB(CB), .NRD(20)) dut (.*);

  int checks = 0, failures = 0;
  bit ms[N], mr[N], mg[N];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; we = 0; wr_addr = '0; wr_sig = '0; wr_ref = '0; wr_sgn = '0;
    foreach (rd_addr[p]) rd_addr[p] = '0;
    @(posedge clk);
    foreach (ms[i]) begin ms[i] = 0; mr[i] = 0; mg[i] = 0; end
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int a;
      bit c;
      c = (cyc == 1500);
      a = $urandom_range(0, N / 4 - 1) * 4;
      clr     <= c;
      we      <= $urandom_range(0, 1);
      wr_addr <= 8'(a);
      wr_sig  <= 4'($urandom);
      wr_ref  <= 4'($urandom);
      wr_sgn  <= 4'($urandom);
      foreach (rd_addr[p]) rd_addr[p] <= 8'($urandom_range(0, N - 1));
      @(negedge clk);
      foreach (rd_addr[p]) begin
        checks++;
        if (rd_sig[p] != ms[rd_addr[p]] || rd_ref[p] != mr[rd_addr[p]] || rd_sgn[p] != mg[rd_addr[p]]) begin
          failures++;
          if (failures < 10) $display("FAIL: port %0d address %0d", p, rd_addr[p]);
        end
      end
      @(posedge clk);
      if (clr) foreach (ms[i]) begin ms[i] = 0; mr[i] = 0; mg[i] = 0; end
      else if (we) for (int i = 0; i < 4; i++) begin
        ms[int'(wr_addr) + i] = wr_sig[i];
        mr[int'(wr_addr) + i] = wr_ref[i];
        mg[int'(wr_addr) + i] = wr_sgn[i];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
