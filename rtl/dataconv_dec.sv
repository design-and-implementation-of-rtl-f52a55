// Data conversion, decoder direction: rebuilds a window of coefficients
// from its bit-plane group words.
//
// The words of one window arrive from the most significant bit-plane
// down. Each word is parsed bit by bit in scan order: a coefficient's bit
// at bit-plane k is taken, and if it is 1 and the coefficient was not yet
// significant in a higher bit-plane, the next bit is its sign; otherwise
// the next bit belongs to the next coefficient. The module keeps the
// significance and the partial magnitudes of the window between words.
//
// Interface: pulse `clear` before a window (or set it together with the
// first word). Each cycle with `valid` consumes one word, left-aligned on
// `code`, for bit-plane `k`; `used` tells how many bits of it were part of
// the word, so that a caller can check or advance a bit pointer. `mag` and
// `sgn` always show the window so far; bit-planes never supplied read as 0.
// One word per cycle and the registered window are this design's choices;
// the parsing rule is the reference architecture's.
module dataconv_dec
  import jp2k_pkg::*;
#(
  parameter int unsigned MW = MAG_W,
  parameter int unsigned NW = WIN,
  localparam int unsigned KW = $clog2(MW),
  localparam int unsigned LW = $clog2(2 * NW + 1)
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            valid,
  input  logic [KW-1:0]   k,
  input  logic [2*NW-1:0] code,
  output logic [LW-1:0]   used,
  output logic [MW-1:0]   mag [NW],
  output logic            sgn [NW]
);

  logic [NW-1:0] sig_q;
  logic [MW-1:0] mag_q [NW];
  logic          sgn_q [NW];

  // parse result for this word
  logic [NW-1:0] bits, newsig, newsgn;

  always_comb begin
    int unsigned p;
    logic [NW-1:0] sig0;
    sig0   = clear ? '0 : sig_q;
    p      = 0;
    bits   = '0;
    newsig = '0;
    newsgn = '0;
    for (int i = 0; i < int'(NW); i++) begin
      bits[i] = code[2*NW-1-p];
      p++;
      if (bits[i] && !sig0[i]) begin
        newsig[i] = 1'b1;
        newsgn[i] = code[2*NW-1-p];
        p++;
      end
    end
    used = LW'(p);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sig_q <= '0;
      for (int i = 0; i < int'(NW); i++) begin
        mag_q[i] <= '0;
        sgn_q[i] <= 1'b0;
      end
    end else if (valid) begin
      for (int i = 0; i < int'(NW); i++) begin
        mag_q[i][k] <= bits[i];
        if (clear) begin
          for (int j = 0; j < int'(MW); j++) if (j != int'(k)) mag_q[i][j] <= 1'b0;
          sgn_q[i] <= newsgn[i];
        end else if (newsig[i]) begin
          sgn_q[i] <= newsgn[i];
        end
      end
      sig_q <= (clear ? '0 : sig_q) | newsig;
    end else if (clear) begin
      sig_q <= '0;
      for (int i = 0; i < int'(NW); i++) begin
        mag_q[i] <= '0;
        sgn_q[i] <= 1'b0;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < int'(NW); i++) begin
      mag[i] = mag_q[i];
      sgn[i] = sgn_q[i];
    end
  end

endmodule
