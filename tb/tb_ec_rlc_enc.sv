// Testbench of ec_rlc_enc (embedded compression). Checks the reference architecture's
// run-length example, three groups coded as 0 / 1 001100001 / 0, and then
// random group words: a blank group must give the single bit 0, any
// other a 1 followed by the raw word. Combinational DUT.
module tb_ec_rlc_enc;
  import jp2k_pkg::*;

  int checks = 0, failures = 0;
  logic [15:0] raw;
  logic [4:0]  raw_len, code_len;
  logic        blank;
  logic [16:0] code;

  ec_rlc_enc dut (.*);

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
    string all;
    // the example: blank, then 0010 0001 with a new sign after the third
    // coefficient's 1, then blank
    all = "";
    for (int g = 0; g < 3; g++) begin
      raw     = (g == 1) ? 16'b0011_0000_1000_0000 : '0;
      raw_len = (g == 1) ? 5'd9 : 5'd8;
      blank   = (g != 1);
      #1;
      for (int i = 0; i < int'(code_len); i++) all = {all, code[16 - i] ? "1" : "0"};
      all = {all, "/"};
    end
    check(all == "0/1001100001/0/", $sformatf("example: %s", all));

    repeat (2000) begin
      int len;
      len   = $urandom_range(8, 16);
      blank = ($urandom_range(0, 3) == 0);
      raw   = blank ? '0 : 16'($urandom) & ~(16'hFFFF >> len);
      if (!blank) raw[15 - $urandom_range(0, 7)] = 1'b1;
      raw_len = blank ? 5'd8 : 5'(len);
      #1;
      if (blank) check(code_len == 1 && code[16] == 1'b0, "blank group");
      else       check(code_len == 5'(len + 1) && code == {1'b1, raw}, $sformatf("group %b", raw));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
