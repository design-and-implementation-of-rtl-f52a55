// Testbench of the bit-plane parallel EBC.
//
// Loads random code-blocks (16x16 here, to keep the run short), codes them
// from the top non-blank bit-plane down to a chosen lowest bit-plane, and
// compares every bit-plane's code word with the reference model in
// ebc_ref_pkg. The cases cover one round (up to four bit-planes), several
// rounds through the state memory, all four sub-band orientations, and a
// stalled output. It also checks the cycle count of each job against a
// bound of one cycle per visited sample plus the step and round overheads,
// and that the two extra ACs and the extra-cycle path were both used.
module tb_ebc;
  import jp2k_pkg::*;
  import ebc_ref_pkg::*;

  localparam int CB = 16;
  localparam int MW = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          ld_valid;
  logic [7:0]    ld_addr;
  logic [MW-1:0] ld_mag [WIN];
  logic          ld_sgn [WIN];
  logic          start, busy, stall;
  band_e         band;
  logic [4:0]    nbp;
  logic [3:0]    kend;
  logic [2:0]    lane_n [4];
  logic [7:0]    lane_byte [4][4];
  logic          lane_eop [4];
  logic [3:0]    lane_k [4];
  logic [2:0]    evt_dual, evt_extra;

  ebc #(.CB(CB), .MW(MW)) dut (.*);

  int checks = 0, failures = 0;
  int n_dual = 0, n_extra = 0, n_stall = 0, n_rounds_multi = 0;
  byte unsigned got[int][$];
  bit eop_seen[int];
  int cycles;

  always @(posedge clk) begin
    n_dual  += evt_dual;
    n_extra += evt_extra;
    for (int l = 0; l < 4; l++) begin
      for (int i = 0; i < int'(lane_n[l]); i++) got[int'(lane_k[l])].push_back(lane_byte[l][i]);
      if (lane_eop[l]) eop_seen[int'(lane_k[l])] = 1;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(int seed_kind, int b, int kend_sel, bit do_stall);
    EbcRef rf;
    int mx, nb, ke, bound, visits;
    rf = new(CB);
    rf.band = b;
    mx = 0;
    for (int i = 0; i < CB * CB; i++) begin
      int u;
      u = $urandom_range(0, 99);
      // mostly small values, some blank regions, a few large ones
      if (seed_kind == 0)      rf.mag[i] = (u < 40) ? 0 : (u < 80) ? $urandom_range(1, 7) :
                                           (u < 97) ? $urandom_range(8, 127) : $urandom_range(128, 1023);
      else if (seed_kind == 1) rf.mag[i] = (u < 85) ? 0 : $urandom_range(1, 40);
      else                     rf.mag[i] = $urandom_range(0, 1023);
      rf.neg[i] = $urandom_range(0, 1);
      if (rf.mag[i] > mx) mx = rf.mag[i];
    end
    nb = 0;
    while ((mx >> nb) != 0) nb++;
    ke = (kend_sel < 0) ? 0 : ((nb - 1 - kend_sel) < 0 ? 0 : nb - 1 - kend_sel);
    rf.run(nb, ke);
    // load in scan order: stripe, column, row
    for (int w = 0; w < CB * CB / WIN; w++) begin
      @(negedge clk);
      ld_valid = 1;
      ld_addr  = 8'(w * WIN);
      for (int j = 0; j < WIN; j++) begin
        int idx, s, c, r;
        idx = w * WIN + j;
        s = idx / (4 * CB); c = (idx % (4 * CB)) / 4; r = idx % 4;
        ld_mag[j] = MW'(rf.mag[(s * 4 + r) * CB + c]);
        ld_sgn[j] = rf.neg[(s * 4 + r) * CB + c];
      end
    end
    @(negedge clk);
    ld_valid = 0;
    got.delete();
    eop_seen.delete();
    band  = band_e'(b);
    nbp   = 5'(nb);
    kend  = 4'(ke);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (busy) begin
      stall = do_stall && ($urandom_range(0, 3) == 0);
      if (stall) n_stall++;
      @(negedge clk);
      cycles++;
    end
    stall = 0;
    @(negedge clk);
    if (nb - ke > 4) n_rounds_multi++;
    visits = 0;
    for (int k = nb - 1; k >= ke; k--) begin
      checks++;
      if (!eop_seen.exists(k) || got[k] != rf.stream[k]) begin
        failures++;
        $display("FAIL band %0d plane %0d: %0d bytes, expected %0d (decisions %0d)",
                 b, k, got.exists(k) ? got[k].size() : -1, rf.stream[k].size(), rf.nsym[k]);
        if (got.exists(k)) $display("  got %p", got[k]);
        $display("  exp %p", rf.stream[k]);
      end
      visits += rf.nsym[k];
    end
    // Cycle bound: per round, one start cycle per step plus at most one
    // cycle per decision of the slowest lane (bounded by all decisions),
    // the flush and the state-memory sweep.
    bound = ((nb - ke + 3) / 4) * ((CB / 4) * (CB + 1) * 2 + 4 + CB * CB / 4) + visits;
    checks++;
    if (!do_stall && cycles > bound) begin
      failures++;
      $display("FAIL cycles %0d above bound %0d", cycles, bound);
    end
    $display("block kind %0d band %0d planes %0d..%0d: %0d cycles, %0d decisions",
             seed_kind, b, nb - 1, ke, cycles, visits);
  endtask

  initial begin
    ld_valid = 0; ld_addr = '0; start = 0; stall = 0; band = BAND_LL; nbp = '0; kend = '0;
    for (int j = 0; j < WIN; j++) begin ld_mag[j] = '0; ld_sgn[j] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_block(0, 0, 3, 0);    // one round, four bit-planes
    run_block(0, 1, -1, 0);   // lossless: several rounds
    run_block(1, 2, 1, 0);    // sparse block, two bit-planes
    run_block(2, 3, -1, 0);   // dense HH block, all bit-planes
    run_block(0, 0, 5, 1);    // two rounds with output stalls
    checks++;
    if (n_dual == 0 || n_extra == 0 || n_stall == 0 || n_rounds_multi == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: dual %0d extra-cycle %0d stall %0d multi-round %0d",
               n_dual, n_extra, n_stall, n_rounds_multi);
    end
    $display("two-decision visits %0d, extra cycles %0d, stalls %0d", n_dual, n_extra, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
