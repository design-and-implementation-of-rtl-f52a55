// End-to-end testbench of jp2k_codec at its default size: 64x64
// code-blocks, ten magnitude bit-planes, four lanes, 64-byte BSC buffers.
// Codes five code-blocks through the whole chain and checks every
// tile-memory record, RDO decision and bit-plane code word against the
// reference; see codec_tb_body.svh for the checks and the mechanism
// counters.
module tb_jp2k_codec_full;
  localparam int CB = jp2k_pkg::CB_DIM;
  localparam int MW = jp2k_pkg::MAG_W;

  `include "codec_tb_body.svh"

  jp2k_codec dut (.*);

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset_dut();
    run_block(0, 0, 0, 100);    // lossless, three rounds
    run_block(1, 1, 40, 100);   // sparse: blank top bit-planes, truncated
    run_block(3, 2, 0, 100);    // all zero
    run_block(0, 3, 0, 3);      // slow output: BSC stalls the EBC
    run_block(2, 1, 50, 100);   // dense, truncated
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
