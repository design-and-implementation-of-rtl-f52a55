// End-to-end testbench of jp2k_codec with 16x16 code-blocks (the default
// is 64x64; tb_jp2k_codec_full runs that size). Codes eight code-blocks
// of different content, sub-bands, rate budgets and output back-pressure
// through the whole chain (RDO, data conversion, embedded compression,
// tile memory, EBC, BSC) and checks every record, decision and code word;
// see codec_tb_body.svh for the checks and the mechanism counters.
module tb_jp2k_codec;
  localparam int CB = 16;
  localparam int MW = 10;

  `include "codec_tb_body.svh"

  jp2k_codec #(.CB(CB), .BSC_DEPTH(16)) dut (.*);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset_dut();
    run_block(0, 0, 0, 100);    // lossless, several rounds
    run_block(1, 1, 0, 100);    // sparse: blank top bit-planes, blank groups
    run_block(2, 3, 60, 100);   // dense, truncated
    run_block(3, 0, 0, 100);    // all zero
    run_block(0, 2, 0, 5);      // slow output: BSC stalls the EBC
    run_block(2, 1, 0, 40);
    run_block(0, 3, 35, 100);
    run_block(1, 2, 50, 60);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
