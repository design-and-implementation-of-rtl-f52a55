// Pre-compression rate-distortion optimisation (RDO controller), reduced
// form: chooses, before any entropy coding, which bit-planes of a
// code-block the EBC will code.
//
// While the DWT coefficients of a code-block stream past (one per cycle),
// the block records the OR of all magnitudes (its top non-blank bit-plane:
// everything above is blank and skipped) and, for every bit-plane j, how
// many coefficients have their most significant 1 at j. From these it
// estimates the bits a bit-plane costs: two per coefficient that becomes
// significant there (the 1 and its sign) plus one per coefficient already
// significant (its refinement bit). With the code-block's rate budget
// (from the rate control) it picks the lowest bit-plane kend such that
// bit-planes nbp-1 .. kend fit in the budget; at least the top bit-plane
// is always kept. A budget of all ones keeps every bit-plane (lossless).
//
// The purpose (truncation points before coding, blank and truncated
// bit-planes skipped) is the reference architecture's; the estimate above is this design's
// own simple stand-in for the reference architecture's rate and distortion models, which
// are not given, and the truncation is at bit-plane rather than pass
// granularity. Results appear with `res_valid` in the cycle after `last`.
module pre_rdo
  import jp2k_pkg::*;
#(
  parameter int unsigned MW = MAG_W,
  parameter int unsigned CB = CB_DIM,
  localparam int unsigned KW = $clog2(MW),
  localparam int unsigned NCW = $clog2(CB * CB + 1),
  localparam int unsigned RW = NCW + 2 + KW
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid,
  input  logic          first,          // first coefficient of a code-block
  input  logic          last,           // last coefficient of a code-block
  input  logic [MW-1:0] mag,
  input  logic [RW-1:0] budget,         // estimated bits allowed
  output logic          res_valid,
  output logic [KW:0]   nbp,            // non-blank bit-planes
  output logic [KW-1:0] kend,           // lowest bit-plane to code
  output logic [RW-1:0] est_bits        // estimate for nbp-1 .. kend
);

  logic [MW-1:0]  or_q;
  logic [NCW-1:0] cnt_q [MW];
  logic [RW-1:0]  budget_q;

  // bit-plane of the most significant 1 of a magnitude
  function automatic int msb_of(input logic [MW-1:0] m);
    int r;
    r = -1;
    for (int i = 0; i < int'(MW); i++) if (m[i]) r = i;
    return r;
  endfunction

  int m_top;                        // bit-plane of the incoming MSB, -1 if zero
  assign m_top = msb_of(mag);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      or_q      <= '0;
      budget_q  <= '0;
      res_valid <= 1'b0;
      for (int j = 0; j < int'(MW); j++) cnt_q[j] <= '0;
    end else begin
      res_valid <= valid && last;
      if (valid) begin
        or_q <= (first ? '0 : or_q) | mag;
        for (int j = 0; j < int'(MW); j++)
          cnt_q[j] <= (first ? '0 : cnt_q[j]) + NCW'(m_top == j);
        if (last) budget_q <= budget;
      end
    end
  end

  always_comb begin
    logic [RW-1:0] acc, sig_above, cost;
    logic stop;
    int top;
    top = msb_of(or_q);
    nbp = (KW+1)'(top + 1);
    kend = '0;
    est_bits = '0;
    acc = '0;
    sig_above = '0;
    stop = 1'b0;
    cost = '0;
    for (int j = int'(MW) - 1; j >= 0; j--) begin
      if (j <= top && !stop) begin
        cost = RW'(2) * RW'(cnt_q[j]) + sig_above;
        if (j == top || acc + cost <= budget_q) begin
          acc      = acc + cost;
          kend     = KW'(j);
          est_bits = acc;
        end else begin
          stop = 1'b1;   // once a bit-plane does not fit, no lower one is taken
        end
        sig_above = sig_above + RW'(cnt_q[j]);
      end
    end
  end

endmodule
