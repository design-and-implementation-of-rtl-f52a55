// One bit-plane lane of the bit-plane parallel EBC: parallel context
// formation for bit-plane k, the lane's visit sequencer, its nineteen
// context states, its MQ coder registers and its own arithmetic coder.
//
// How it works. The EBC moves all lanes together one stripe column at a
// time (the encoder may align every bit-plane at the same column). In the
// step for column c a lane first visits the Pass 1 samples of column c+1,
// then the Pass 2 and Pass 3 samples of column c: the column-switching scan
// order, in which the Pass 1 sub-scan runs one column ahead. Each visit
// takes one cycle and yields one or two decisions (zero coding plus sign
// coding when a sample becomes significant, or run-length plus uniform).
// The first decision goes through the lane's own AC; the second through an
// extra AC if the dispatcher grants one (grant2), otherwise it is held and
// coded in the next cycle.
//
// Significance is not stored per bit-plane; it is derived from the
// magnitude bits, as in equations (1) to (4) of the reference architecture:
//   up     significant before bit-plane k: a magnitude bit above k, or the
//          significance kept in the state memory by an earlier round
//   s_p1   up, or the bit at k is 1 and the sample is coded in Pass 1
//   s_full up, or the bit at k is 1
// A neighbour scanned before C counts with s_p1 in Pass 1 and Pass 2 and
// with s_full in Pass 3; one scanned after C counts with `up` in Pass 1 and
// with s_p1 in Pass 2 and Pass 3. The next stripe always counts as
// insignificant (parallel, stripe-causal mode). Pass 1 membership of the
// current column is kept per column (p1_mem) and that of the bottom row of
// the previous stripe in a 64-bit line buffer (lb). Contexts are the
// standard's tables. The visit order, the cycle per visit and the two
// decisions per visit follow the reference architecture; the run-length visit split, the
// idle first cycle of each step and the termination of the code word once
// per bit-plane (rather than once per pass) are this design's choices.
//
// Window: win_* [col][row], col 0..3 = columns c-1..c+2, row 0 = bottom
// row of the previous stripe, rows 1..4 = stripe rows 0..3. Columns outside
// the code-block and row 0 of the first stripe must be zero. Magnitudes
// must be masked to bits ks..0.
module ebc_lane
  import jp2k_pkg::*;
#(
  parameter int unsigned CB  = CB_DIM,
  parameter int unsigned MW  = MAG_W,
  localparam int unsigned KW  = $clog2(MW),
  localparam int unsigned CW  = $clog2(CB) + 1   // column index, signed range -1..CB-1
)(
  input  logic                 clk,
  input  logic                 rst_n,
  input  band_e                band,
  input  logic                 active,       // lane has a bit-plane this round
  input  logic [KW-1:0]        k,            // bit-plane of the lane
  input  logic [KW-1:0]        ks,           // highest bit-plane of this round
  input  logic                 plane_start,  // reset coder and contexts
  input  logic                 stripe_start, // with step_start at column -1
  input  logic                 step_start,   // a new column step begins
  input  logic signed [CW-1:0] col,          // c
  input  logic [MW-1:0]        win_mag [4][5],
  input  logic                 win_sgn [4][5],
  input  logic                 win_sig [4][5], // state memory: significant
  input  logic                 win_ref [4][5], // state memory: refined
  input  logic                 flush,        // terminate the code word
  input  logic                 stall,        // no coding this cycle
  output logic                 done,         // no visit left in this step
  // second decision, to and from the dispatcher
  output logic                 req2,
  input  logic                 grant2,
  output mq_reg_t              mid_reg,
  output ctx_state_t           mid_cx,
  output logic                 mid_d,
  input  mq_reg_t              ext_reg,
  input  ctx_state_t           ext_cx,
  input  logic [1:0]           ext_n,
  input  logic [7:0]           ext_byte [3],
  // code stream bytes
  output logic [2:0]           out_n,
  output logic [7:0]           out_byte [4],
  output logic                 out_eop       // end of the bit-plane's code word
);

  // ---------------------------------------------------------------- state
  mq_reg_t    coder;
  ctx_state_t cx_mem [19];
  logic [CB-1:0] p1_mem [4];    // Pass 1 membership per stripe row
  logic [CB-1:0] lb;            // line buffer: previous stripe, bottom row
  logic [3:0] vis_a, vis_b;     // visits done in columns c+1 and c
  logic [1:0] rl_st;            // 0 start, 1 run interrupted, 2 run finished
  logic       half;             // a held second decision
  sym_t       held;

  // ------------------------------------------------ window significance
  logic b     [4][6];
  logic up    [4][6];
  logic refd  [4][6];
  logic neg   [4][6];
  logic p1    [4][6];
  logic s_p1  [4][6];
  logic s_fu  [4][6];
  logic [3:0] p1_x;
  logic x_valid, c_valid;

  function automatic logic lb_at(input logic [CB-1:0] v, input int ci);
    if (ci < 0 || ci >= int'(CB)) return 1'b0;
    return v[ci];
  endfunction

  always_comb begin
    int ci;
    c_valid = (col >= 0);
    x_valid = (int'(col) + 1 < int'(CB));
    for (int cc = 0; cc < 4; cc++) begin
      for (int rr = 0; rr < 6; rr++) begin
        if (rr < 5) begin
          b[cc][rr]    = win_mag[cc][rr][k];
          up[cc][rr]   = win_sig[cc][rr] | ((win_mag[cc][rr] >> (int'(k) + 1)) != '0);
          refd[cc][rr] = (k == ks) ? win_ref[cc][rr]
                                   : (win_sig[cc][rr] | ((win_mag[cc][rr] >> (int'(k) + 2)) != '0));
          neg[cc][rr]  = win_sgn[cc][rr];
        end else begin
          b[cc][rr] = 1'b0; up[cc][rr] = 1'b0; refd[cc][rr] = 1'b0; neg[cc][rr] = 1'b0;
        end
      end
    end
    // Pass 1 membership of stored columns and of the line buffer
    for (int cc = 0; cc < 4; cc++) begin
      ci = int'(col) - 1 + cc;
      p1[cc][0] = lb_at(lb, ci);
      for (int rr = 1; rr < 5; rr++)
        p1[cc][rr] = (cc < 2) ? lb_at(p1_mem[rr-1], ci) : 1'b0;
      p1[cc][5] = 1'b0;
    end
    // Pass 1 membership of column c+1, equation (3) and (4): a neighbour
    // before C counts with s_p1, one after C only when significant before.
    for (int rr = 1; rr < 5; rr++) begin
      logic any;
      any = 1'b0;
      for (int dr = -1; dr <= 1; dr++) begin
        // column c: before
        any |= up[1][rr+dr] | (b[1][rr+dr] & p1[1][rr+dr]);
        // column c+2: after, except the previous stripe row
        if (rr + dr == 0) any |= up[3][0] | (b[3][0] & p1[3][0]);
        else              any |= up[3][rr+dr];
      end
      // same column: above is before, below is after
      any |= up[2][rr-1] | (b[2][rr-1] & p1[2][rr-1]);
      any |= up[2][rr+1];
      p1_x[rr-1] = x_valid && !up[2][rr] && any;
      p1[2][rr] = p1_x[rr-1];
    end
    for (int cc = 0; cc < 4; cc++)
      for (int rr = 0; rr < 6; rr++) begin
        s_p1[cc][rr] = up[cc][rr] | (b[cc][rr] & p1[cc][rr]);
        s_fu[cc][rr] = up[cc][rr] | b[cc][rr];
      end
  end

  // Contexts of the sample at window (cc, rr) from a 3x3 significance map.
  // Returns {zc[4:0], sc[4:0], xor}.
  function automatic logic [10:0] ctx_of(input band_e bd, input logic s[3][3],
                                         input logic n[3][3]);
    logic [1:0] h, v;
    logic [2:0] d;
    logic [5:0] sc;
    h = 2'(s[1][0]) + 2'(s[1][2]);
    v = 2'(s[0][1]) + 2'(s[2][1]);
    d = 3'(s[0][0]) + 3'(s[0][2]) + 3'(s[2][0]) + 3'(s[2][2]);
    sc = sc_ctx_xor(sc_contrib(s[1][0], n[1][0], s[1][2], n[1][2]),
                    sc_contrib(s[0][1], n[0][1], s[2][1], n[2][1]));
    return {zc_ctx(bd, h, v, d), sc};
  endfunction

  // ------------------------------------------------------- visit selection
  typedef enum logic [2:0] {V_NONE, V_HELD, V_P1, V_P2, V_P3, V_RL0, V_RL1} visit_e;
  visit_e     vkind;
  logic [1:0] vrow;
  logic [1:0] nsym;
  sym_t       sym0, sym1;
  logic       rl_elig;
  logic [1:0] rl_pos;
  logic       rl_any;

  always_comb begin
    logic [3:0] need_a, need_b;
    logic s3 [3][3];
    logic n3 [3][3];
    logic [10:0] cx;
    int r;
    logic zero_ctx;
    logic bb, anyn;

    // run-length eligibility of column c (all four insignificant, not in
    // Pass 1, all with the all-zero context before any is coded)
    rl_elig = c_valid;
    for (int rr = 1; rr < 5; rr++) begin
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          if (j == 0)      s3[i][j] = s_fu[0][rr-1+i];
          else if (j == 2) s3[i][j] = (rr - 1 + i == 0) ? s_fu[2][0] : s_p1[2][rr-1+i];
          else             s3[i][j] = (rr - 1 + i == 0) ? s_fu[1][0] : 1'b0;
          n3[i][j] = neg[j][rr-1+i];
        end
      cx = ctx_of(band, s3, n3);
      zero_ctx = (cx[10:6] == 5'd0);
      rl_elig &= !up[1][rr] && !p1[1][rr] && zero_ctx;
    end
    rl_any = b[1][1] | b[1][2] | b[1][3] | b[1][4];
    rl_pos = b[1][1] ? 2'd0 : b[1][2] ? 2'd1 : b[1][3] ? 2'd2 : 2'd3;

    need_a = p1_x & ~vis_a;
    need_b = c_valid ? (~{p1[1][4], p1[1][3], p1[1][2], p1[1][1]} & ~vis_b) : 4'd0;

    vkind = V_NONE;
    vrow  = 2'd0;
    if (!active) begin
      vkind = V_NONE;
    end else if (half) begin
      vkind = V_HELD;
    end else if (need_a != 4'd0) begin
      vkind = V_P1;
      vrow  = need_a[0] ? 2'd0 : need_a[1] ? 2'd1 : need_a[2] ? 2'd2 : 2'd3;
    end else if (rl_elig && rl_st == 2'd0 && need_b != 4'd0) begin
      vkind = V_RL0;
    end else if (rl_elig && rl_st == 2'd1) begin
      vkind = V_RL1;
      vrow  = rl_pos;
    end else if (need_b != 4'd0) begin
      vrow  = need_b[0] ? 2'd0 : need_b[1] ? 2'd1 : need_b[2] ? 2'd2 : 2'd3;
      vkind = up[1][int'(vrow)+1] ? V_P2 : V_P3;
    end

    // neighbourhood of the visited sample for its pass
    r = int'(vrow) + 1;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        s3[i][j] = 1'b0;
        n3[i][j] = 1'b0;
      end
    if (vkind == V_P1) begin
      for (int i = 0; i < 3; i++) begin
        n3[i][0] = neg[1][r-1+i]; n3[i][1] = neg[2][r-1+i]; n3[i][2] = neg[3][r-1+i];
        s3[i][0] = s_p1[1][r-1+i];
        s3[i][2] = (r - 1 + i == 0) ? s_p1[3][0] : up[3][r-1+i];
      end
      s3[0][1] = s_p1[2][r-1];
      s3[2][1] = up[2][r+1];
    end else begin
      for (int i = 0; i < 3; i++) begin
        n3[i][0] = neg[0][r-1+i]; n3[i][1] = neg[1][r-1+i]; n3[i][2] = neg[2][r-1+i];
      end
      if (vkind == V_P2) begin
        for (int i = 0; i < 3; i++) begin
          s3[i][0] = s_p1[0][r-1+i];
          s3[i][2] = s_p1[2][r-1+i];
        end
        s3[0][1] = s_p1[1][r-1];
        s3[2][1] = s_p1[1][r+1];
      end else begin
        for (int i = 0; i < 3; i++) begin
          s3[i][0] = s_fu[0][r-1+i];
          s3[i][2] = (r - 1 + i == 0) ? s_fu[2][0] : s_p1[2][r-1+i];
        end
        s3[0][1] = s_fu[1][r-1];
        s3[2][1] = s_p1[1][r+1];
      end
    end
    cx = ctx_of(band, s3, n3);

    bb   = 1'b0;
    anyn = 1'b0;
    nsym = 2'd0;
    sym0 = '0;
    sym1 = '0;
    unique case (vkind)
      V_HELD: begin
        nsym = 2'd1;
        sym0 = held;
      end
      V_P1, V_P3: begin
        bb = (vkind == V_P1) ? b[2][r] : b[1][r];
        nsym = bb ? 2'd2 : 2'd1;
        sym0 = '{ctx: cx[10:6], bit_: bb};
        sym1 = '{ctx: cx[5:1], bit_: ((vkind == V_P1) ? neg[2][r] : neg[1][r]) ^ cx[0]};
      end
      V_P2: begin
        anyn = s3[0][0] | s3[0][1] | s3[0][2] | s3[1][0] | s3[1][2] |
               s3[2][0] | s3[2][1] | s3[2][2];
        nsym = 2'd1;
        sym0 = '{ctx: refd[1][r] ? 5'd16 : (anyn ? 5'd15 : 5'd14), bit_: b[1][r]};
      end
      V_RL0: begin
        nsym = rl_any ? 2'd2 : 2'd1;
        sym0 = '{ctx: CTX_RL, bit_: rl_any};
        sym1 = '{ctx: CTX_UNI, bit_: rl_pos[1]};
      end
      V_RL1: begin
        nsym = 2'd2;
        sym0 = '{ctx: CTX_UNI, bit_: rl_pos[0]};
        sym1 = '{ctx: cx[5:1], bit_: neg[1][r] ^ cx[0]};
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------- lane's own AC
  logic       go;
  ctx_state_t cx0;
  mq_reg_t    r0;
  ctx_state_t cx0_out;
  logic [1:0] n0;
  logic [7:0] by0 [3];

  assign go  = (nsym != 2'd0) && !stall && !step_start && !plane_start && !flush;
  assign cx0 = cx_mem[sym0.ctx];

  mq_ac u_ac (
    .valid  (go),
    .flush  (flush && active && !stall),
    .r_in   (coder),
    .cx_in  (cx0),
    .d      (sym0.bit_),
    .r_out  (r0),
    .cx_out (cx0_out),
    .out_n  (n0),
    .out_byte(by0)
  );

  assign req2    = go && (nsym == 2'd2);
  assign mid_reg = r0;
  assign mid_cx  = (sym1.ctx == sym0.ctx) ? cx0_out : cx_mem[sym1.ctx];
  assign mid_d   = sym1.bit_;
  assign done    = (vkind == V_NONE);
  assign out_eop = flush && active && !stall;

  always_comb begin
    out_n = 3'(n0);
    for (int i = 0; i < 4; i++) out_byte[i] = (i < 3) ? by0[i] : 8'd0;
    if (req2 && grant2) begin
      for (int i = 0; i < 2; i++)
        if (i < int'(ext_n)) out_byte[int'(n0) + i] = ext_byte[i];
      out_n = 3'(n0) + 3'(ext_n);
    end
  end

  // ------------------------------------------------------------ registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coder <= MQ_INIT;
      for (int i = 0; i < 19; i++) cx_mem[i] <= ctx_init(5'(i));
      for (int i = 0; i < 4; i++) p1_mem[i] <= '0;
      lb    <= '0;
      vis_a <= '0;
      vis_b <= '0;
      rl_st <= '0;
      half  <= 1'b0;
      held  <= '0;
    end else if (plane_start) begin
      coder <= MQ_INIT;
      for (int i = 0; i < 19; i++) cx_mem[i] <= ctx_init(5'(i));
      lb    <= '0;
      half  <= 1'b0;
    end else if (step_start) begin
      vis_a <= '0;
      vis_b <= '0;
      rl_st <= '0;
      half  <= 1'b0;
      if (stripe_start) lb <= p1_mem[3];
    end else begin
      // Pass 1 membership of column c+1 is final during the step
      if (x_valid)
        for (int rr = 0; rr < 4; rr++) p1_mem[rr][int'(col) + 1] <= p1_x[rr];
      if (flush && active && !stall) coder <= r0;
      if (go) begin
        cx_mem[sym0.ctx] <= cx0_out;
        coder <= r0;
        if (req2 && grant2) begin
          cx_mem[sym1.ctx] <= ext_cx;
          coder <= ext_reg;
        end
        if (req2 && !grant2) begin
          half <= 1'b1;
          held <= sym1;
        end
        if (vkind == V_HELD) half <= 1'b0;
        unique case (vkind)
          V_P1: vis_a[vrow] <= 1'b1;
          V_P2, V_P3: vis_b[vrow] <= 1'b1;
          V_RL0: begin
            if (rl_any) rl_st <= 2'd1;
            else begin
              rl_st <= 2'd2;
              vis_b <= 4'hF;
            end
          end
          V_RL1: begin
            rl_st <= 2'd2;
            for (int i = 0; i < 4; i++) if (i <= int'(rl_pos)) vis_b[i] <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
