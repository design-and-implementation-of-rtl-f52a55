// Testbench of dataconv_enc (bit-plane grouping and sign scattering).
// First the four-coefficient example of the reference architecture's data-conversion
// figure (magnitudes 5, 9, 0, 2, the first negative) on a four-wide
// instance: the group words of bit-planes 3..0 must be 01000, 11000,
// 00010 and 1100. Then random windows of eight on the default instance
// against a bit-serial model, including blank groups. Combinational DUT;
// the checks sample after a 1 ns settle.
module tb_dataconv_enc;
  import jp2k_pkg::*;
  localparam int MW = MAG_W;

  int checks = 0, failures = 0;

  logic [MW-1:0] m4 [4];
  logic          s4 [4];
  logic [3:0]    k4;
  logic [7:0]    c4;
  logic [3:0]    l4;
  logic          b4;
  dataconv_enc #(.MW(MW), .NW(4)) u4 (.mag(m4), .sgn(s4), .k(k4), .code(c4), .len(l4), .blank(b4));

  logic [MW-1:0] m8 [WIN];
  logic          s8 [WIN];
  logic [3:0]    k8;
  logic [15:0]   c8;
  logic [4:0]    l8;
  logic          b8;
  dataconv_enc u8 (.mag(m8), .sgn(s8), .k(k8), .code(c8), .len(l8), .blank(b8));

  initial begin
    #100000;
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
    string exp4 [4] = '{"1100", "00010", "11000", "01000"};   // bit-planes 0..3
    m4 = '{10'd5, 10'd9, 10'd0, 10'd2};
    s4 = '{1'b1, 1'b0, 1'b0, 1'b0};
    for (int k = 3; k >= 0; k--) begin
      string got;
      k4 = 4'(k);
      #1;
      got = "";
      for (int i = 0; i < int'(l4); i++) got = {got, c4[7 - i] ? "1" : "0"};
      check(got == exp4[k] && !b4, $sformatf("example bit-plane %0d: %s, expected %s", k, got, exp4[k]));
    end

    repeat (3000) begin
      logic [15:0] e;
      int p;
      bit any;
      foreach (m8[i]) begin
        int u;
        u = $urandom_range(0, 9);
        m8[i] = (u < 5) ? '0 : (u < 8) ? MW'($urandom_range(1, 15)) : MW'($urandom_range(0, 1023));
        s8[i] = $urandom_range(0, 1);
      end
      k8 = 4'($urandom_range(0, MW - 1));
      #1;
      e = '0;
      p = 15;
      any = 0;
      foreach (m8[i]) begin
        e[p--] = m8[i][k8];
        if (m8[i][k8]) begin
          any = 1;
          if ((m8[i] >> (k8 + 1)) == 0) e[p--] = s8[i];
        end
      end
      check(int'(l8) == 15 - p && c8 == e && b8 == !any,
            $sformatf("k %0d: %b/%0d, expected %b/%0d", k8, c8, l8, e, 15 - p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
