// Dispatcher between the bit-plane lanes and the extra arithmetic coders.
//
// Every lane has its own AC for the first decision of a visit. A lane whose
// visit produces a second decision in the same cycle requests one of the
// NEXTRA shared ACs. The dispatcher grants at most NEXTRA requests per
// cycle, lowest lane first, steers each granted lane's intermediate coder
// registers, context state and decision to its slot (the forward
// dispatcher of the reference architecture), and steers each slot's result back to its
// lane (the return dispatcher). A lane left without a slot codes its
// second decision in the next cycle; the reference architecture calls this the extra cycle
// needed when more than two bit-planes produce two decisions.
//
// Purely combinational. Four lanes and two extra ACs follow the reference architecture;
// the fixed lane priority is this design's choice.
module dispatcher
  import jp2k_pkg::*;
#(
  parameter int unsigned NL     = NPAR,  // lanes
  parameter int unsigned NEXTRA = 2      // extra ACs
)(
  // lane side
  input  logic       req      [NL],
  input  mq_reg_t    lane_reg [NL],
  input  ctx_state_t lane_cx  [NL],
  input  logic       lane_d   [NL],
  output logic       grant    [NL],
  output mq_reg_t    ret_reg  [NL],
  output ctx_state_t ret_cx   [NL],
  output logic [1:0] ret_n    [NL],
  output logic [7:0] ret_byte [NL][3],
  // slot side, towards the extra ACs
  output logic       slot_valid [NEXTRA],
  output mq_reg_t    slot_reg   [NEXTRA],
  output ctx_state_t slot_cx    [NEXTRA],
  output logic       slot_d     [NEXTRA],
  input  mq_reg_t    ac_reg     [NEXTRA],
  input  ctx_state_t ac_cx      [NEXTRA],
  input  logic [1:0] ac_n       [NEXTRA],
  input  logic [7:0] ac_byte    [NEXTRA][3]
);

  localparam int unsigned SW = (NEXTRA > 1) ? $clog2(NEXTRA) : 1;

  logic [SW-1:0] slot_of [NL];

  always_comb begin
    int unsigned used;
    used = 0;
    for (int s = 0; s < int'(NEXTRA); s++) begin
      slot_valid[s] = 1'b0;
      slot_reg[s]   = MQ_INIT;
      slot_cx[s]    = '0;
      slot_d[s]     = 1'b0;
    end
    for (int l = 0; l < int'(NL); l++) begin
      grant[l]   = 1'b0;
      slot_of[l] = '0;
      if (req[l] && used < NEXTRA) begin
        grant[l]         = 1'b1;
        slot_of[l]       = SW'(used);
        slot_valid[used] = 1'b1;
        slot_reg[used]   = lane_reg[l];
        slot_cx[used]    = lane_cx[l];
        slot_d[used]     = lane_d[l];
        used++;
      end
    end
  end

  // return path, kept apart from the forward path so that the two are
  // separate nets
  always_comb begin
    for (int l = 0; l < int'(NL); l++) begin
      ret_reg[l] = ac_reg[slot_of[l]];
      ret_cx[l]  = ac_cx[slot_of[l]];
      ret_n[l]   = grant[l] ? ac_n[slot_of[l]] : 2'd0;
      for (int i = 0; i < 3; i++) ret_byte[l][i] = ac_byte[slot_of[l]][i];
    end
  end

endmodule
