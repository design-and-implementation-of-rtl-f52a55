// Embedded compression, decoder: undoes the run-length coding of one
// group of two stripe columns of one bit-plane.
//
// A code word that starts with 0 stands for an all-zero group: the decoder
// produces WIN zero bits (which the data conversion parses as WIN zero
// coefficient bits and no sign). A code word that starts with 1 carries the
// raw group word after the flag, which is passed on unchanged. The length
// of the raw word is only known once the data conversion has parsed it, so
// the decoder takes `raw_used` back from it and reports the code word's
// total length for checking or for advancing a bit pointer.
//
// Combinational. The rule follows the reference architecture; the split of work with the
// data conversion is this design's choice.
module ec_rlc_dec
  import jp2k_pkg::*;
#(
  parameter int unsigned NW = WIN,
  localparam int unsigned LW = $clog2(2 * NW + 1),
  localparam int unsigned OW = $clog2(2 * NW + 2)
)(
  input  logic [2*NW:0]   code,
  output logic [2*NW-1:0] raw,
  output logic            blank,
  input  logic [LW-1:0]   raw_used,
  output logic [OW-1:0]   code_len
);

  always_comb begin
    blank = ~code[2*NW];
    raw   = blank ? '0 : code[2*NW-1:0];
    code_len = blank ? OW'(1) : OW'(raw_used) + OW'(1);
  end

endmodule
