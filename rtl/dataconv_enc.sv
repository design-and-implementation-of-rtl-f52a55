// Data conversion, encoder direction: bit-plane grouping with sign
// scattering.
//
// A window of WIN coefficients (two stripe columns, in EBC scan order) is
// turned into one group word per bit-plane, so that the tile memory can be
// read one bit-plane at a time and truncated bit-planes are never fetched.
// The group word of bit-plane k holds the bit of each coefficient at k, in
// scan order; right after a coefficient's first 1 bit (its most significant
// one) the coefficient's sign follows. A bit-plane word is therefore WIN to
// 2*WIN bits long. Example with four coefficients: bits 0,1,0,0 where the
// second coefficient first becomes significant and is positive give 01000.
//
// Combinational: for bit-plane k the word appears on `code` left-aligned
// (first bit at the MSB) with its length in `len`; `blank` says that all
// WIN magnitude bits at k are 0. Grouping, scan order and sign position
// follow the reference architecture; the window of WIN coefficients and the sign
// convention (1 = negative) are this design's choices.
module dataconv_enc
  import jp2k_pkg::*;
#(
  parameter int unsigned MW = MAG_W,
  parameter int unsigned NW = WIN,
  localparam int unsigned KW = $clog2(MW),
  localparam int unsigned LW = $clog2(2 * NW + 1)
)(
  input  logic [MW-1:0]   mag [NW],
  input  logic            sgn [NW],
  input  logic [KW-1:0]   k,
  output logic [2*NW-1:0] code,
  output logic [LW-1:0]   len,
  output logic            blank
);

  always_comb begin
    int unsigned p;
    logic bk, first;
    code  = '0;
    p     = 0;
    blank = 1'b1;
    for (int i = 0; i < int'(NW); i++) begin
      bk    = mag[i][k];
      first = bk && ((mag[i] >> (int'(k) + 1)) == '0);
      code[2*NW-1-p] = bk;
      p++;
      if (first) begin
        code[2*NW-1-p] = sgn[i];
        p++;
      end
      if (bk) blank = 1'b0;
    end
    len = LW'(p);
  end

endmodule
