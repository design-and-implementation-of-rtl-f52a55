// Testbench of ec_rlc_dec (embedded decompression). Decodes the reference architecture's
// run-length example (0 / 1 001100001 / 0) and random code words produced
// by a model of the encoder, with the raw length fed back as the data
// conversion would, and checks the raw word, the blank flag and the code
// length. Combinational DUT.
module tb_ec_rlc_dec;
  import jp2k_pkg::*;

  int checks = 0, failures = 0;
  logic [16:0] code;
  logic [15:0] raw;
  logic        blank;
  logic [4:0]  raw_used, code_len;

  ec_rlc_dec dut (.*);

  initial begin
    #100000;
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
    // example: the stream 0 1001100001 0 read group by group
    code = '0; raw_used = 5'd8; #1;
    check(blank && raw == '0 && code_len == 1, "example group 1");
    code = 17'b1_0011_0000_1000_0000; raw_used = 5'd9; #1;
    check(!blank && raw == 16'b0011_0000_1000_0000 && code_len == 10, "example group 2");
    code = 17'b0_1111_0000_0000_0000; raw_used = 5'd8; #1;   // bits after the 0 belong to the next group
    check(blank && raw == '0 && code_len == 1, "example group 3");

    repeat (2000) begin
      logic [15:0] r;
      int len;
      bit bl;
      bl  = ($urandom_range(0, 3) == 0);
      len = $urandom_range(8, 16);
      r   = bl ? '0 : 16'($urandom) & ~(16'hFFFF >> len);
      if (!bl) r[15] = 1'b1;
      code = bl ? {1'b0, 16'($urandom)} : {1'b1, r};
      raw_used = bl ? 5'd8 : 5'(len);
      #1;
      check(blank == bl && raw == r && int'(code_len) == (bl ? 1 : len + 1),
            $sformatf("code %b", code));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
