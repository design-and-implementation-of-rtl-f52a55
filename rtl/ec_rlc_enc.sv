// Embedded compression, encoder: run-length coding of bit-plane data.
//
// Many stripe columns of a bit-plane are all zero, so each group of two
// stripe columns (eight bits of one bit-plane, the window of the data
// conversion) is coded as a single 0 when all its bits are 0, and as a 1
// followed by the raw group word otherwise. The raw word includes the sign
// bits the data conversion scattered into it. Example from the reference architecture: the
// groups 00000000 / 0010 0001 with one new sign / 00000000 code as
// 0 / 1 001100001 / 0.
//
// Combinational. Input: the data-conversion word (left-aligned), its
// length and its blank flag. Output: the code word, left-aligned, and its
// length (1, or 1 + len). The coding rule follows the reference architecture; the
// two-column group as the unit is the reference architecture's, the ports are this
// design's choice.
module ec_rlc_enc
  import jp2k_pkg::*;
#(
  parameter int unsigned NW = WIN,
  localparam int unsigned LW = $clog2(2 * NW + 1),
  localparam int unsigned OW = $clog2(2 * NW + 2)
)(
  input  logic [2*NW-1:0] raw,
  input  logic [LW-1:0]   raw_len,
  input  logic            blank,
  output logic [2*NW:0]   code,
  output logic [OW-1:0]   code_len
);

  always_comb begin
    if (blank) begin
      code     = '0;
      code_len = OW'(1);
    end else begin
      code     = {1'b1, raw};
      code_len = OW'(raw_len) + OW'(1);
    end
  end

endmodule
