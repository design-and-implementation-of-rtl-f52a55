// Testbench of pre_rdo (truncation-point choice before coding). Streams
// random 16x16 code-blocks of several kinds (all zero, small, full range,
// a few large values) with random budgets, from none to unlimited, and
// checks nbp, kend and the estimate against a model of the rule: bits of
// bit-plane j = 2 per coefficient whose top 1 is at j + 1 per coefficient
// already significant; bit-planes are taken from the top one while the
// running total fits, the top one always. Also checks that the result
// appears exactly in the cycle after the last coefficient.
module tb_pre_rdo;
  import jp2k_pkg::*;
  localparam int MW = MAG_W;
  localparam int CB = 16;
  localparam int RW = $clog2(CB * CB + 1) + 2 + $clog2(MW);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          valid, first, last, res_valid;
  logic [MW-1:0] mag;
  logic [RW-1:0] budget, est_bits;
  logic [4:0]    nbp;
  logic [3:0]    kend;

  pre_rdo #(.MW(MW), .CB(CB)) dut (.*);

  int checks = 0, failures = 0, n_trunc = 0, n_zero = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    valid = 0; first = 0; last = 0; mag = '0; budget = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 60; blk++) begin
      int m [CB * CB];
      int cnt [MW];
      int top, ke, ormag, kind;
      longint acc, sa, cost, bud, full;
      kind = blk % 4;
      foreach (cnt[j]) cnt[j] = 0;
      ormag = 0;
      foreach (m[i]) begin
        int u;
        u = $urandom_range(0, 99);
        case (kind)
          0: m[i] = 0;
          1: m[i] = (u < 60) ? 0 : $urandom_range(1, 20);
          2: m[i] = $urandom_range(0, 1023);
          default: m[i] = (u < 95) ? $urandom_range(0, 3) : $urandom_range(0, 1023);
        endcase
        ormag |= m[i];
        for (int j = 0; j < MW; j++) if ((m[i] >> j) == 1) cnt[j]++;
      end
      full = 0;
      sa = 0;
      for (int j = MW - 1; j >= 0; j--) begin
        full += 2 * cnt[j] + sa;
        sa += cnt[j];
      end
      bud = ($urandom_range(0, 4) == 0) ? (longint'(1) << RW) - 1 : full * $urandom_range(0, 100) / 100;
      top = -1;
      for (int j = 0; j < MW; j++) if ((ormag >> j) & 1) top = j;
      ke = 0;
      acc = 0;
      sa = 0;
      for (int j = top; j >= 0; j--) begin
        cost = 2 * cnt[j] + sa;
        if (j == top || acc + cost <= bud) begin
          acc += cost;
          ke = j;
        end else break;
        sa += cnt[j];
      end
      for (int i = 0; i < CB * CB; i++) begin
        valid  = 1;
        first  = (i == 0);
        last   = (i == CB * CB - 1);
        mag    = MW'(m[i]);
        budget = RW'(bud);
        @(negedge clk);
        check(res_valid == (i == CB * CB - 1), "res_valid timing");
        valid = 0;
        if ($urandom_range(0, 7) == 0) @(negedge clk);
      end
      check(int'(nbp) == top + 1 && (top < 0 || (int'(kend) == ke && longint'(est_bits) == acc)),
            $sformatf("block %0d: nbp %0d kend %0d est %0d, expected %0d %0d %0d",
                      blk, nbp, kend, est_bits, top + 1, ke, acc));
      if (top < 0) n_zero++;
      else if (ke > 0) n_trunc++;
    end
    check(n_trunc > 0 && n_zero > 0, "cases not covered");
    $display("truncated blocks %0d, zero blocks %0d", n_trunc, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
