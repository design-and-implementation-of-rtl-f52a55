// Shared body of the end-to-end testbenches of jp2k_codec (included by
// tb_jp2k_codec, 16x16 code-blocks, and tb_jp2k_codec_full, the default
// 64x64). The including module defines CB and MW and instantiates the
// codec as `dut` with `.*`; this file declares the signals, the tile
// memory model, the reference checks and the per-block task.
//
// For every code-block the testbench
//  - drives the coefficients in scan order with random gaps, and counts
//    cycles in which the codec refused one (cf_ready low);
//  - checks each tile-memory record written against its own encoding of
//    the bit-plane group (sign after the first 1, a lone 0 for a blank
//    group);
//  - checks the RDO decision (nbp, kend) against its own model of the
//    estimate;
//  - checks the code-words bits read back against the records of the
//    chosen bit-planes only;
//  - collects the output bytes per bit-plane, with bs_ready randomly low,
//    and compares every bit-plane's code word with the reference EBC
//    (ebc_ref_pkg).
// Mechanism counters (blank bit-planes skipped, truncation, all-zero
// block, several rounds, blank groups, BSC stalls, extra cycles, dual
// decisions, input back-pressure) must each be seen at least once.

  import jp2k_pkg::*;
  import ebc_ref_pkg::*;

  localparam int KW   = $clog2(MW);
  localparam int NWIN = CB * CB / WIN;
  localparam int TAW  = KW + $clog2(NWIN);
  localparam int CLW  = $clog2(2 * WIN + 2);
  localparam int RW   = $clog2(CB * CB + 1) + 2 + KW;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           cf_valid, cf_ready, cf_sgn;
  logic [MW-1:0]  cf_mag;
  band_e          cf_band;
  logic [RW-1:0]  cf_budget;
  logic           tm_we, tm_re;
  logic [TAW-1:0] tm_waddr, tm_raddr;
  logic [2*WIN:0] tm_wdata, tm_rdata;
  logic [CLW-1:0] tm_wlen, tm_rlen;
  logic           bs_valid, bs_ready, bs_eop;
  logic [KW-1:0]  bs_k;
  logic [7:0]     bs_byte;
  logic           blk_done;
  logic [KW:0]    blk_nbp;
  logic [KW-1:0]  blk_kend;
  logic [RW-1:0]  blk_est;
  logic [31:0]    tm_wbits, tm_rbits, tm_rblank, cnt_dual, cnt_extra, cnt_stall;
  logic           len_err;

  tile_mem #(.AW(TAW), .DW(2 * WIN + 1), .LW(CLW)) u_tm (
    .clk (clk), .we (tm_we), .waddr (tm_waddr), .wdata (tm_wdata), .wlen (tm_wlen),
    .re (tm_re), .raddr (tm_raddr), .rdata (tm_rdata), .rlen (tm_rlen)
  );

  int checks = 0, failures = 0;
  // mechanism counters
  int m_skip = 0, m_trunc = 0, m_zero = 0, m_multi = 0, m_blank = 0, m_stall = 0;
  int m_extra = 0, m_dual = 0, m_bp = 0;
  // bandwidth figures
  longint bw_raw = 0, bw_read = 0, bw_written = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // current block, seen by the monitors
  int cur_mag[];
  bit cur_neg[];
  int ready_pct = 100;
  int rec_bad = 0, rec_cnt = 0;
  byte unsigned got[int][$];
  int eop_cnt[int];

  // expected record of window w, bit-plane k, in scan order
  function automatic void exp_record(int w, int k, output logic [2*WIN:0] code, output int len);
    int p;
    bit any;
    code = '0;
    p = 2 * WIN - 1;
    any = 0;
    for (int i = 0; i < WIN; i++) begin
      int m, s, x, y;
      s = (w * WIN + i) / (4 * CB);
      x = ((w * WIN + i) / 4) % CB;
      y = s * 4 + (w * WIN + i) % 4;
      m = cur_mag[y * CB + x];
      code[p--] = (m >> k) & 1;
      if (((m >> k) & 1) == 1) begin
        any = 1;
        if ((m >> (k + 1)) == 0) code[p--] = cur_neg[y * CB + x];
      end
    end
    if (!any) begin
      code = '0;
      len = 1;
    end else begin
      len = 2 * WIN - 1 - p + 1;
      code[2 * WIN] = 1'b1;
    end
  endfunction

  // tile-memory writes are compared with the expected records
  always @(posedge clk) if (rst_n && tm_we) begin
    logic [2*WIN:0] e;
    int len, k, w;
    k = int'(tm_waddr) / NWIN;
    w = int'(tm_waddr) % NWIN;
    exp_record(w, k, e, len);
    rec_cnt++;
    if (len != int'(tm_wlen) || (tm_wdata >> (2 * WIN + 1 - len)) != (e >> (2 * WIN + 1 - len))) begin
      rec_bad++;
      if (rec_bad < 5) $display("record k %0d w %0d: got %b/%0d expected %b/%0d", k, w, tm_wdata, tm_wlen, e, len);
    end
  end

  // output collection and the ready pattern
  always @(posedge clk) begin
    if (rst_n && bs_valid && bs_ready) begin
      if (bs_eop) eop_cnt[int'(bs_k)] = eop_cnt.exists(int'(bs_k)) ? eop_cnt[int'(bs_k)] + 1 : 1;
      else        got[int'(bs_k)].push_back(bs_byte);
    end
    bs_ready <= ($urandom_range(0, 99) < ready_pct);
    if (cf_valid && !cf_ready) m_bp++;
  end

  // the RDO model: bits of bit-plane j = 2 per new significance + 1 per
  // refinement; bit-planes are taken from the top while they fit
  function automatic void exp_rdo(longint budget, output int nbp, output int kend);
    int cnt[MW], top, ormag;
    longint acc, sa, cost;
    ormag = 0;
    foreach (cnt[j]) cnt[j] = 0;
    foreach (cur_mag[i]) begin
      ormag |= cur_mag[i];
      for (int j = MW - 1; j >= 0; j--) if ((cur_mag[i] >> j) == 1) cnt[j]++;
    end
    top = -1;
    for (int j = 0; j < MW; j++) if ((ormag >> j) & 1) top = j;
    nbp = top + 1;
    kend = 0;
    acc = 0;
    sa = 0;
    for (int j = top; j >= 0; j--) begin
      cost = 2 * cnt[j] + sa;
      if (j == top || acc + cost <= budget) begin
        acc += cost;
        kend = j;
      end else break;
      sa += cnt[j];
    end
  endfunction

  // kind: 0 mixed, 1 sparse and small, 2 dense full range, 3 all zero
  // budget: 0 unlimited, else that fraction (percent) of the full estimate
  task automatic run_block(int kind, int b, int budget_pct, int rdy);
    EbcRef rf;
    int nbp_e, kend_e, rb0, wb0, bl0, st0, ex0, du0;
    longint budget;
    int full_len, read_len;
    rf = new(CB);
    rf.band = b;
    cur_mag = new[CB * CB];
    cur_neg = new[CB * CB];
    for (int i = 0; i < CB * CB; i++) begin
      int u;
      u = $urandom_range(0, 99);
      case (kind)
        0: cur_mag[i] = (u < 40) ? 0 : (u < 80) ? $urandom_range(1, 7) :
                        (u < 97) ? $urandom_range(8, 127) : $urandom_range(128, (1 << MW) - 1);
        1: cur_mag[i] = (u < 88) ? 0 : $urandom_range(1, 25);
        2: cur_mag[i] = $urandom_range(0, (1 << MW) - 1);
        default: cur_mag[i] = 0;
      endcase
      cur_neg[i] = (cur_mag[i] != 0) && $urandom_range(0, 1);
      rf.mag[i] = cur_mag[i];
      rf.neg[i] = cur_neg[i];
    end
    // budget: a fraction of the model's estimate for all bit-planes
    if (budget_pct == 0) budget = (longint'(1) << RW) - 1;
    else begin
      // full estimate: sum over the bit-planes of 2*new + above
      longint sa, acc;
      int cnt[MW];
      foreach (cnt[j]) cnt[j] = 0;
      foreach (cur_mag[i]) for (int j = 0; j < MW; j++) if ((cur_mag[i] >> j) == 1) cnt[j]++;
      sa = 0;
      acc = 0;
      for (int j = MW - 1; j >= 0; j--) begin
        acc += 2 * cnt[j] + sa;
        sa += cnt[j];
      end
      budget = acc * budget_pct / 100;
    end
    exp_rdo(budget, nbp_e, kend_e);
    if (nbp_e == 0) kend_e = 0;
    if (nbp_e > 0) rf.run(nbp_e, kend_e);

    got.delete();
    eop_cnt.delete();
    ready_pct = rdy;
    rb0 = tm_rbits; wb0 = tm_wbits; bl0 = tm_rblank;
    st0 = cnt_stall; ex0 = cnt_extra; du0 = cnt_dual;

    // coefficients in scan order
    for (int i = 0; i < CB * CB; i++) begin
      int s, x, y;
      s = i / (4 * CB);
      x = (i / 4) % CB;
      y = s * 4 + i % 4;
      while ($urandom_range(0, 9) == 0) begin
        cf_valid <= 0;
        @(posedge clk);
      end
      cf_valid  <= 1;
      cf_mag    <= MW'(cur_mag[y * CB + x]);
      cf_sgn    <= cur_neg[y * CB + x];
      cf_band   <= band_e'(b);
      cf_budget <= RW'(budget);
      @(posedge clk);
      while (!cf_ready) @(posedge clk);
    end
    cf_valid <= 0;
    while (!blk_done) @(posedge clk);
    @(posedge clk);

    // decision
    check(int'(blk_nbp) == nbp_e && (nbp_e == 0 || int'(blk_kend) == kend_e),
          $sformatf("RDO: got nbp %0d kend %0d, expected %0d %0d", blk_nbp, blk_kend, nbp_e, kend_e));
    // records
    check(rec_bad == 0, $sformatf("%0d of %0d tile-memory records differ", rec_bad, rec_cnt));
    rec_bad = 0;
    full_len = 0;
    read_len = 0;
    for (int w = 0; w < NWIN; w++)
      for (int k = 0; k < MW; k++) begin
        logic [2*WIN:0] e;
        int len;
        exp_record(w, k, e, len);
        full_len += len;
        if (nbp_e > 0 && k >= kend_e && k < nbp_e) read_len += len;
      end
    check(int'(tm_wbits) - wb0 == full_len, $sformatf("bits written %0d, expected %0d", int'(tm_wbits) - wb0, full_len));
    check(int'(tm_rbits) - rb0 == read_len, $sformatf("bits read %0d, expected %0d", int'(tm_rbits) - rb0, read_len));
    check(!len_err, "a record read back did not parse to its length");
    // code words
    for (int k = 0; k < MW; k++) begin
      bit want;
      want = nbp_e > 0 && k >= kend_e && k < nbp_e;
      if (want) begin
        bit same;
        same = got.exists(k) ? (got[k].size() == rf.stream[k].size()) : (rf.stream[k].size() == 0);
        if (same) foreach (rf.stream[k][i]) if (got[k][i] != rf.stream[k][i]) same = 0;
        check(same, $sformatf("bit-plane %0d: %0d bytes, expected %0d", k,
                              got.exists(k) ? got[k].size() : 0, rf.stream[k].size()));
        check(eop_cnt.exists(k) && eop_cnt[k] == 1, $sformatf("bit-plane %0d: end marks", k));
      end else begin
        check(!got.exists(k) && !eop_cnt.exists(k), $sformatf("bit-plane %0d should not be coded", k));
      end
    end

    bw_raw     += longint'(CB * CB) * (MW + 1);
    bw_written += full_len;
    bw_read    += read_len;
    if (nbp_e == 0) m_zero++;
    else if (nbp_e < MW) m_skip++;
    if (nbp_e > 0 && kend_e > 0) m_trunc++;
    if (nbp_e - kend_e > NPAR) m_multi++;
    if (int'(tm_rblank) > bl0) m_blank++;
    if (int'(cnt_stall) > st0) m_stall++;
    if (int'(cnt_extra) > ex0) m_extra++;
    if (int'(cnt_dual) > du0) m_dual++;
    $display("block kind %0d band %0d budget %0d%%: planes %0d..%0d, written %0d bits, read %0d bits",
             kind, b, budget_pct, nbp_e - 1, kend_e, full_len, read_len);
  endtask

  task automatic reset_dut();
    cf_valid  = 0;
    cf_mag    = '0;
    cf_sgn    = 0;
    cf_band   = BAND_LL;
    cf_budget = '0;
    bs_ready  = 1;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
  endtask

  task automatic report();
    $display("mechanisms: skipped-top %0d truncated %0d zero-block %0d multi-round %0d blank-groups %0d",
             m_skip, m_trunc, m_zero, m_multi, m_blank);
    $display("            bsc-stall %0d extra-cycle %0d dual %0d input-backpressure %0d",
             m_stall, m_extra, m_dual, m_bp);
    $display("tile memory: word-level %0d bits, written %0d (%0d%%), read for coding %0d (%0d%%)",
             bw_raw, bw_written, bw_written * 100 / bw_raw, bw_read, bw_read * 100 / bw_raw);
    check(m_skip > 0, "no block had blank top bit-planes skipped");
    check(m_trunc > 0, "no block was truncated");
    check(m_zero > 0, "no all-zero block");
    check(m_multi > 0, "no block needed several rounds");
    check(m_blank > 0, "no blank group was read");
    check(m_stall > 0, "the BSC never stalled the EBC");
    check(m_extra > 0, "no extra cycle");
    check(m_dual > 0, "no visit with two decisions");
    check(m_bp > 0, "the input never saw back-pressure");
    check(bw_written < bw_raw, "no bandwidth saved");
  endtask
