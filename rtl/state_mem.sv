// State memory of the EBC: one significance bit, one refinement bit and one
// sign bit for each of the 64x64 samples of a code-block (3 x 0.5 KB).
//
// It is needed only when a code-block has more bit-planes to code than the
// EBC has lanes and is therefore coded in several rounds: at the end of a
// round the EBC writes, for every sample, whether it is significant after
// the round's last bit-plane (sig), whether it was significant before that
// bit-plane (ref, so the next round knows whether the next refinement is
// the first) and its sign; the next round reads them instead of the
// bit-planes it no longer fetches. Its size and the three indicators follow
// the reference architecture; the port arrangement (NRD asynchronous read ports for the
// context window, one write port of a whole stripe column) is this design's
// choice. Written as register arrays.
module state_mem
  import jp2k_pkg::*;
#(
  parameter int unsigned CB  = CB_DIM,
  parameter int unsigned NRD = 20,
  localparam int unsigned AW = $clog2(CB * CB)
)(
  input  logic          clk,
  input  logic          clr,             // clear every indicator
  // write one stripe column: four samples from address wr_addr up
  input  logic          we,
  input  logic [AW-1:0] wr_addr,
  input  logic [3:0]    wr_sig,
  input  logic [3:0]    wr_ref,
  input  logic [3:0]    wr_sgn,
  // reads
  input  logic [AW-1:0] rd_addr [NRD],
  output logic          rd_sig  [NRD],
  output logic          rd_ref  [NRD],
  output logic          rd_sgn  [NRD]
);

  logic [CB*CB-1:0] sig_q, ref_q, sgn_q;

  always_ff @(posedge clk) begin
    if (clr) begin
      sig_q <= '0;
      ref_q <= '0;
      sgn_q <= '0;
    end else if (we) begin
      for (int i = 0; i < 4; i++) begin
        sig_q[int'(wr_addr) + i] <= wr_sig[i];
        ref_q[int'(wr_addr) + i] <= wr_ref[i];
        sgn_q[int'(wr_addr) + i] <= wr_sgn[i];
      end
    end
  end

  always_comb begin
    for (int p = 0; p < int'(NRD); p++) begin
      rd_sig[p] = sig_q[rd_addr[p]];
      rd_ref[p] = ref_q[rd_addr[p]];
      rd_sgn[p] = sgn_q[rd_addr[p]];
    end
  end

endmodule
