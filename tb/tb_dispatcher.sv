// Testbench of the dispatcher between the lanes and the two extra ACs.
// Random request patterns of four lanes with random coder registers; the
// extra ACs are replaced by a known combinational function of their slot
// inputs, so that the testbench can check that each granted lane gets
// the result of its own registers, context and decision back, that the
// lowest requesting lanes are granted first, at most two per cycle, that a
// lane without a grant gets no bytes, and that unused slots are idle.
// Combinational DUT.
module tb_dispatcher;
  import jp2k_pkg::*;
  localparam int NL = 4;
  localparam int NX = 2;

  logic       req [NL], lane_d [NL], grant [NL];
  mq_reg_t    lane_reg [NL], ret_reg [NL];
  ctx_state_t lane_cx [NL], ret_cx [NL];
  logic [1:0] ret_n [NL];
  logic [7:0] ret_byte [NL][3];
  logic       slot_valid [NX], slot_d [NX];
  mq_reg_t    slot_reg [NX], ac_reg [NX];
  ctx_state_t slot_cx [NX], ac_cx [NX];
  logic [1:0] ac_n [NX];
  logic [7:0] ac_byte [NX][3];

  dispatcher #(.NL(NL), .NEXTRA(NX)) dut (.*);

  // stand-in for the extra ACs
  function automatic mq_reg_t f_reg(mq_reg_t r, logic d);
    mq_reg_t o;
    o = r;
    o.a = r.a ^ 16'h5A5A;
    o.c = r.c + {31'd0, d};
    return o;
  endfunction

  always_comb
    for (int s = 0; s < NX; s++) begin
      ac_reg[s] = f_reg(slot_reg[s], slot_d[s]);
      ac_cx[s]  = '{idx: slot_cx[s].idx + 6'd1, mps: ~slot_cx[s].mps};
      ac_n[s]   = slot_valid[s] ? slot_reg[s].b[1:0] : 2'd0;
      for (int i = 0; i < 3; i++) ac_byte[s][i] = slot_reg[s].b + 8'(i);
    end

  int checks = 0, failures = 0, n_full = 0;

  initial begin
    #1000000;
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
    repeat (3000) begin
      int granted, nreq;
      for (int l = 0; l < NL; l++) begin
        req[l]      = $urandom_range(0, 1);
        lane_d[l]   = $urandom_range(0, 1);
        lane_reg[l] = '{a: 16'($urandom), c: $urandom, ct: 4'($urandom), b: 8'($urandom), bvalid: 1'($urandom)};
        lane_cx[l]  = '{idx: 6'($urandom_range(0, 40)), mps: 1'($urandom)};
      end
      #1;
      granted = 0;
      nreq = 0;
      for (int l = 0; l < NL; l++) begin
        bit want;
        nreq += req[l];
        want = req[l] && granted < NX;
        check(grant[l] == want, $sformatf("lane %0d grant %b", l, grant[l]));
        if (want) begin
          granted++;
          check(ret_reg[l] == f_reg(lane_reg[l], lane_d[l]) &&
                ret_cx[l].idx == lane_cx[l].idx + 6'd1 && ret_cx[l].mps == ~lane_cx[l].mps &&
                ret_n[l] == lane_reg[l].b[1:0] && ret_byte[l][2] == lane_reg[l].b + 8'd2,
                $sformatf("lane %0d result", l));
        end else begin
          check(ret_n[l] == 2'd0, $sformatf("lane %0d: bytes without grant", l));
        end
      end
      for (int s = 0; s < NX; s++) check(slot_valid[s] == (s < granted), "slot use");
      if (nreq > NX) n_full++;
    end
    check(n_full > 0, "no cycle with more requests than extra ACs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
