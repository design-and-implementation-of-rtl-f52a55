// Testbench of dataconv_dec (inverse data conversion). For random windows
// of eight coefficients it builds the group words of bit-planes top..kend
// with a model of the forward conversion, feeds them one per cycle (clear
// with the first word, sometimes as a separate pulse, sometimes with idle
// cycles between words) and checks `used` against each word's length and
// the rebuilt magnitudes and signs: bit-planes below kend read as zero and
// a coefficient with no 1 in the supplied bit-planes carries no sign.
module tb_dataconv_dec;
  import jp2k_pkg::*;
  localparam int MW = MAG_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          clear, valid;
  logic [3:0]    k;
  logic [15:0]   code;
  logic [4:0]    used;
  logic [MW-1:0] mag [WIN];
  logic          sgn [WIN];

  dataconv_dec dut (.*);

  int checks = 0, failures = 0;

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
    int m [WIN];
    bit s [WIN];
    clear = 0; valid = 0; k = '0; code = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    repeat (500) begin
      int top, ke;
      bit sep;
      foreach (m[i]) begin
        int u;
        u = $urandom_range(0, 9);
        m[i] = (u < 4) ? 0 : (u < 8) ? $urandom_range(1, 31) : $urandom_range(0, 1023);
        s[i] = $urandom_range(0, 1);
      end
      top = $urandom_range(0, MW - 1);
      ke  = $urandom_range(0, top);
      foreach (m[i]) m[i] &= (2 << top) - 1;   // top is the highest bit-plane
      sep = $urandom_range(0, 1);
      // inputs change at the falling edge, the DUT takes them at the rising one
      @(negedge clk);
      if (sep) begin
        clear = 1; valid = 0;
        @(negedge clk);
      end
      for (int kk = top; kk >= ke; kk--) begin
        logic [15:0] e;
        int p;
        e = '0;
        p = 15;
        foreach (m[i]) begin
          e[p--] = (m[i] >> kk) & 1;
          if (((m[i] >> kk) & 1) && (m[i] >> (kk + 1)) == 0) e[p--] = s[i];
        end
        // the bits after the word are don't-cares
        for (int b = p; b >= 0; b--) e[b] = $urandom_range(0, 1);
        clear = !sep && (kk == top);
        valid = 1;
        k     = 4'(kk);
        code  = e;
        #1;
        check(int'(used) == 15 - p, $sformatf("used %0d, expected %0d", used, 15 - p));
        @(negedge clk);
        clear = 0; valid = 0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
      foreach (m[i]) begin
        int em;
        em = (m[i] >> ke) << ke;
        em = em & ((2 << top) - 1);
        check(int'(mag[i]) == em && (em == 0 || sgn[i] == s[i]),
              $sformatf("coef %0d: %0d/%0d, expected %0d/%0d", i, mag[i], sgn[i], em, s[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
