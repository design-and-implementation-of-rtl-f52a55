// Bit-plane parallel embedded block coder (EBC), encoder.
//
// The EBC codes up to NPAR bit-planes of one code-block at the same time,
// one lane per bit-plane (as in the reference architecture: parallel context
// formation, four lane ACs, a dispatcher, two extra ACs, a second
// dispatcher, state memory and line buffer). Only the bit-planes chosen
// before coding are coded: from the top non-blank bit-plane nbp-1 down to
// kend. When there are more of them than lanes, the code-block is coded in
// rounds; between rounds every sample's significance, refinement state and
// sign go to the state memory, and the next round reads the coefficient
// bit-planes only from its own top bit-plane down.
//
// A round walks the code-block stripe by stripe and, within a stripe,
// column step by column step (c = -1 .. CB-1). Each step starts with a
// cycle that hands the context window (columns c-1..c+2, the previous
// stripe's bottom row and the stripe's four rows) to the lanes, then waits
// until every lane has finished its visits for that step (see ebc_lane).
// At the end of the round every active lane terminates its code word.
//
// Interface. Load a code-block through ld_* (WIN coefficients in EBC scan
// order per write: stripe, then column, then row), then pulse `start` with
// nbp (number of non-blank bit-planes) and kend (lowest bit-plane to
// code). `busy` stays high until the last code word is flushed. Each lane
// emits 0..4 code-stream bytes per cycle on lane_byte with lane_eop at the
// end of a bit-plane's code word and lane_k naming the bit-plane. While
// `stall` is high nothing is coded. Coefficients are sign-magnitude.
// evt_dual and evt_extra count, per cycle, the lanes coding two decisions
// and the lanes left without an extra AC.
//
// Timing: one cycle per visited sample and lane, plus one cycle per column
// step, plus the flush and the state-memory sweep (CB*CB/4 cycles) at the
// end of each round; a lane waits one more cycle when more than two lanes
// have a second decision in the same cycle.
//
// Following the reference architecture: four bit-plane lanes with their own
// ACs, two shared extra ACs behind a dispatcher, the column-switching scan,
// the stripe-causal context formation, and the state memory for coding a
// code-block in several rounds. This design's own choices: the code-block
// buffer and its load port, the step handshake, the state-memory sweep,
// contexts reset and code words terminated once per bit-plane (rather
// than per coding pass). The combinational path lane -> dispatcher ->
// extra AC -> dispatcher -> lane is written as separate always_comb blocks
// so that no block reads what it drives.
module ebc
  import jp2k_pkg::*;
#(
  parameter int unsigned CB  = CB_DIM,
  parameter int unsigned MW  = MAG_W,
  parameter int unsigned NL  = NPAR,
  parameter int unsigned NEXTRA = 2,
  localparam int unsigned AW = $clog2(CB * CB),
  localparam int unsigned KW = $clog2(MW),
  localparam int unsigned CW = $clog2(CB) + 1
)(
  input  logic          clk,
  input  logic          rst_n,
  // code-block load
  input  logic          ld_valid,
  input  logic [AW-1:0] ld_addr,          // scan index of the first of WIN
  input  logic [MW-1:0] ld_mag [WIN],
  input  logic          ld_sgn [WIN],
  // job
  input  logic          start,
  input  band_e         band,
  input  logic [KW:0]   nbp,              // non-blank bit-planes, 0..MW
  input  logic [KW-1:0] kend,             // lowest bit-plane to code
  output logic          busy,
  input  logic          stall,
  // code stream
  output logic [2:0]    lane_n    [NL],
  output logic [7:0]    lane_byte [NL][4],
  output logic          lane_eop  [NL],
  output logic [KW-1:0] lane_k    [NL],
  output logic [2:0]    evt_dual,
  output logic [2:0]    evt_extra
);

  localparam int unsigned NS = CB / 4;   // stripes

  // ------------------------------------------------- coefficient buffer
  logic [MW-1:0] cb_mag [CB*CB];
  logic          cb_sgn [CB*CB];

  always_ff @(posedge clk) begin
    if (ld_valid)
      for (int i = 0; i < int'(WIN); i++) begin
        cb_mag[int'(ld_addr) + i] <= ld_mag[i];
        cb_sgn[int'(ld_addr) + i] <= ld_sgn[i];
      end
  end

  // ------------------------------------------------------- controller
  typedef enum logic [2:0] {S_IDLE, S_RSTART, S_STEP, S_WAIT, S_FLUSH, S_SMEM} st_e;
  st_e st;

  logic [KW-1:0]        ks, ke, kend_q;
  logic [KW:0]          nround;           // lanes used this round
  logic [$clog2(NS)-1:0] stripe;
  logic signed [CW-1:0] col;
  logic [AW-1:0]        sm_addr;
  band_e                band_q;
  logic                 all_done;
  logic                 smem_clr;

  logic lane_done [NL];

  always_comb begin
    all_done = 1'b1;
    for (int l = 0; l < int'(NL); l++) all_done &= lane_done[l];
  end

  // lowest bit-plane of a round that starts at top
  function automatic logic [KW-1:0] round_end(input logic [KW-1:0] top, input logic [KW-1:0] lo);
    return (int'(top) - int'(lo) + 1 > int'(NL)) ? KW'(int'(top) - int'(NL) + 1) : lo;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      ks      <= '0;
      ke      <= '0;
      kend_q  <= '0;
      nround  <= '0;
      stripe  <= '0;
      col     <= -1;
      sm_addr <= '0;
      band_q  <= BAND_LL;
    end else begin
      unique case (st)
        S_IDLE: if (start && nbp != '0 && {1'b0, kend} < nbp) begin
          ks     <= KW'(nbp - 1'b1);
          ke     <= round_end(KW'(nbp - 1'b1), kend);
          nround <= (KW+1)'(int'(nbp) - 1 - int'(round_end(KW'(nbp - 1'b1), kend)) + 1);
          kend_q <= kend;
          band_q <= band;
          st     <= S_RSTART;
        end
        S_RSTART: begin
          stripe <= '0;
          col    <= -1;
          st     <= S_STEP;
        end
        S_STEP: st <= S_WAIT;
        S_WAIT: if (all_done && !stall) begin
          if (col == CW'(CB - 1)) begin
            col <= -1;
            if (int'(stripe) == int'(NS) - 1) st <= S_FLUSH;
            else begin
              stripe <= stripe + 1'b1;
              st     <= S_STEP;
            end
          end else begin
            col <= col + 1'b1;
            st  <= S_STEP;
          end
        end
        S_FLUSH: if (!stall) begin
          if (ke == kend_q) st <= S_IDLE;
          else begin
            sm_addr <= '0;
            st      <= S_SMEM;
          end
        end
        S_SMEM: begin
          sm_addr <= sm_addr + AW'(4);
          if (sm_addr == AW'(CB * CB - 4)) begin
            ks     <= ke - 1'b1;
            ke     <= round_end(ke - 1'b1, kend_q);
            nround <= (KW+1)'(int'(ke) - 1 - int'(round_end(ke - 1'b1, kend_q)) + 1);
            st     <= S_RSTART;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy     = (st != S_IDLE);
  assign smem_clr = (st == S_IDLE) && start;

  // ------------------------------------------------------ context window
  logic [MW-1:0] win_mag [4][5];
  logic          win_sgn [4][5];
  logic          win_sig [4][5];
  logic          win_ref [4][5];
  logic [AW-1:0] rd_addr [20];
  logic          rd_sig  [20];
  logic          rd_ref  [20];
  logic          rd_sgn  [20];
  logic          inwin   [4][5];
  logic [MW-1:0] kmask;

  assign kmask = MW'((2 << ks) - 1);

  logic [AW-1:0] widx [4][5];

  always_comb begin
    int cc, s, r;
    for (int wc = 0; wc < 4; wc++)
      for (int wr = 0; wr < 5; wr++) begin
        cc = int'(col) - 1 + wc;
        s  = (wr == 0) ? int'(stripe) - 1 : int'(stripe);
        r  = (wr == 0) ? 3 : wr - 1;
        inwin[wc][wr] = (cc >= 0) && (cc < int'(CB)) && (s >= 0);
        widx[wc][wr]  = inwin[wc][wr] ? AW'(s * 4 * int'(CB) + cc * 4 + r) : '0;
        rd_addr[wc*5 + wr] = widx[wc][wr];
      end
  end

  always_comb begin
    logic [AW-1:0] idx;
    for (int wc = 0; wc < 4; wc++)
      for (int wr = 0; wr < 5; wr++) begin
        idx = widx[wc][wr];
        win_mag[wc][wr] = inwin[wc][wr] ? (cb_mag[idx] & kmask) : '0;
        // a sample made significant in an earlier round takes its sign from
        // the state memory
        win_sgn[wc][wr] = inwin[wc][wr] && (rd_sig[wc*5 + wr] ? rd_sgn[wc*5 + wr] : cb_sgn[idx]);
        win_sig[wc][wr] = inwin[wc][wr] && rd_sig[wc*5 + wr];
        win_ref[wc][wr] = inwin[wc][wr] && rd_ref[wc*5 + wr];
      end
  end

  // ---------------------------------------------------------- state memory
  logic [3:0] sm_sig, sm_ref, sm_sgn;
  logic       sm_rsig [4];
  logic       sm_rref [4];
  logic       sm_rsgn [4];
  logic [AW-1:0] sm_raddr [4];

  always_comb
    for (int i = 0; i < 4; i++) sm_raddr[i] = sm_addr + AW'(i);

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      logic [MW-1:0] m;
      m = cb_mag[int'(sm_addr) + i] & kmask;
      sm_sig[i] = sm_rsig[i] | ((m >> int'(ke)) != '0);
      sm_ref[i] = sm_rref[i] | sm_rsig[i] | ((m >> (int'(ke) + 1)) != '0);
      sm_sgn[i] = sm_rsig[i] ? sm_rsgn[i] : cb_sgn[int'(sm_addr) + i];
    end
  end

  // read ports 0..19 serve the context window, 20..23 the round-end sweep
  logic [AW-1:0] smr_addr [24];
  logic          smr_sig  [24];
  logic          smr_ref  [24];
  logic          smr_sgn  [24];

  always_comb begin
    for (int i = 0; i < 20; i++) smr_addr[i] = rd_addr[i];
    for (int i = 0; i < 4; i++) smr_addr[20 + i] = sm_raddr[i];
  end

  always_comb begin
    for (int i = 0; i < 20; i++) begin
      rd_sig[i]   = smr_sig[i];
      rd_ref[i]   = smr_ref[i];
      rd_sgn[i]   = smr_sgn[i];
    end
    for (int i = 0; i < 4; i++) begin
      sm_rsig[i] = smr_sig[20 + i];
      sm_rref[i] = smr_ref[20 + i];
      sm_rsgn[i] = smr_sgn[20 + i];
    end
  end

  state_mem #(.CB(CB), .NRD(24)) u_smem (
    .clk     (clk),
    .clr     (smem_clr),
    .we      (st == S_SMEM),
    .wr_addr (sm_addr),
    .wr_sig  (sm_sig),
    .wr_ref  (sm_ref),
    .wr_sgn  (sm_sgn),
    .rd_addr (smr_addr),
    .rd_sig  (smr_sig),
    .rd_ref  (smr_ref),
    .rd_sgn  (smr_sgn)
  );

  // ----------------------------------------------------------------- lanes
  logic       req2   [NL];
  logic       grant2 [NL];
  mq_reg_t    mid_reg [NL];
  ctx_state_t mid_cx  [NL];
  logic       mid_d   [NL];
  mq_reg_t    ext_reg [NL];
  ctx_state_t ext_cx  [NL];
  logic [1:0] ext_n   [NL];
  logic [7:0] ext_byte [NL][3];

  for (genvar l = 0; l < NL; l++) begin : g_lane
    logic [KW-1:0] kl;
    logic          act;
    assign act = (l < int'(nround));
    assign kl  = act ? KW'(int'(ks) - l) : '0;
    assign lane_k[l] = kl;

    ebc_lane #(.CB(CB), .MW(MW)) u_lane (
      .clk          (clk),
      .rst_n        (rst_n),
      .band         (band_q),
      .active       (act && st != S_IDLE),
      .k            (kl),
      .ks           (ks),
      .plane_start  (st == S_RSTART),
      .stripe_start (st == S_STEP && col == -1),
      .step_start   (st == S_STEP),
      .col          (col),
      .win_mag      (win_mag),
      .win_sgn      (win_sgn),
      .win_sig      (win_sig),
      .win_ref      (win_ref),
      .flush        (st == S_FLUSH),
      .stall        (stall || st != S_WAIT && st != S_FLUSH),
      .done         (lane_done[l]),
      .req2         (req2[l]),
      .grant2       (grant2[l]),
      .mid_reg      (mid_reg[l]),
      .mid_cx       (mid_cx[l]),
      .mid_d        (mid_d[l]),
      .ext_reg      (ext_reg[l]),
      .ext_cx       (ext_cx[l]),
      .ext_n        (ext_n[l]),
      .ext_byte     (ext_byte[l]),
      .out_n        (lane_n[l]),
      .out_byte     (lane_byte[l]),
      .out_eop      (lane_eop[l])
    );
  end

  // ------------------------------------------- dispatchers and extra ACs
  logic       slot_valid [NEXTRA];
  mq_reg_t    slot_reg   [NEXTRA];
  ctx_state_t slot_cx    [NEXTRA];
  logic       slot_d     [NEXTRA];
  mq_reg_t    ac_reg     [NEXTRA];
  ctx_state_t ac_cx      [NEXTRA];
  logic [1:0] ac_n       [NEXTRA];
  logic [7:0] ac_byte    [NEXTRA][3];

  dispatcher #(.NL(NL), .NEXTRA(NEXTRA)) u_disp (
    .req        (req2),
    .lane_reg   (mid_reg),
    .lane_cx    (mid_cx),
    .lane_d     (mid_d),
    .grant      (grant2),
    .ret_reg    (ext_reg),
    .ret_cx     (ext_cx),
    .ret_n      (ext_n),
    .ret_byte   (ext_byte),
    .slot_valid (slot_valid),
    .slot_reg   (slot_reg),
    .slot_cx    (slot_cx),
    .slot_d     (slot_d),
    .ac_reg     (ac_reg),
    .ac_cx      (ac_cx),
    .ac_n       (ac_n),
    .ac_byte    (ac_byte)
  );

  for (genvar s = 0; s < NEXTRA; s++) begin : g_extra
    mq_ac u_ac (
      .valid   (slot_valid[s]),
      .flush   (1'b0),
      .r_in    (slot_reg[s]),
      .cx_in   (slot_cx[s]),
      .d       (slot_d[s]),
      .r_out   (ac_reg[s]),
      .cx_out  (ac_cx[s]),
      .out_n   (ac_n[s]),
      .out_byte(ac_byte[s])
    );
  end

  always_comb begin
    evt_dual  = '0;
    evt_extra = '0;
    for (int l = 0; l < int'(NL); l++) begin
      evt_dual  += 3'(req2[l]);
      evt_extra += 3'(req2[l] && !grant2[l]);
    end
  end

endmodule
