// Testbench of the MQ arithmetic-coder step.
//
// Drives long random decision sequences (skewed and uniform, over all
// nineteen contexts) through one mq_ac whose registers and context states
// are held in the testbench, terminates the code word with a flush step,
// and compares the bytes with the software-style MQ encoder of
// ebc_ref_pkg. Also checks that no decision emits more than two bytes.
module tb_mq_ac;
  import jp2k_pkg::*;
  import ebc_ref_pkg::*;

  logic       valid, flush, d;
  mq_reg_t    r_in, r_out;
  ctx_state_t cx_in, cx_out;
  logic [1:0] out_n;
  logic [7:0] out_byte [3];

  mq_ac dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    EbcRef rf;
    ctx_state_t cst [19];
    byte unsigned got[$];
    int len;
    rf = new(4);
    for (int t = 0; t < 40; t++) begin
      rf.mq_init();
      for (int i = 0; i < 19; i++) cst[i] = ctx_init(5'(i));
      r_in = MQ_INIT;
      got = {};
      len = (t < 5) ? t : $urandom_range(1, 3000);
      for (int i = 0; i < len; i++) begin
        int cx;
        bit bb;
        cx = (t % 3 == 0) ? $urandom_range(0, 2) : $urandom_range(0, 18);
        bb = (t % 2 == 0) ? ($urandom_range(0, 9) == 0) : $urandom_range(0, 1);
        rf.encode(cx, bb);
        valid = 1; flush = 0; d = bb; cx_in = cst[cx];
        #1;
        if (out_n > 2) begin
          failures++;
          $display("FAIL %0d bytes from one decision", out_n);
        end
        for (int j = 0; j < int'(out_n); j++) got.push_back(out_byte[j]);
        cst[cx] = cx_out;
        r_in = r_out;
        #1;
      end
      rf.mq_flush(0);
      valid = 0; flush = 1; cx_in = '0; d = 0;
      #1;
      for (int j = 0; j < int'(out_n); j++) got.push_back(out_byte[j]);
      checks++;
      if (got != rf.stream[0] || r_out != MQ_INIT) begin
        failures++;
        $display("FAIL sequence %0d (%0d decisions): %0d bytes, expected %0d", t, len,
                 got.size(), rf.stream[0].size());
        $display("  got %p", got);
        $display("  exp %p", rf.stream[0]);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
