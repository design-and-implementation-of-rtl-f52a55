// Arithmetic coder (AC) step: one binary decision through the JPEG 2000 MQ
// coder, purely combinational.
//
// The EBC gives every bit-plane lane its own coder registers (A, C, CT and
// the pending byte B) and its own nineteen context states; an AC is the
// logic that advances those registers by one decision. Because it holds no
// state, two ACs can be chained in one clock cycle (the lane's own AC,
// then one of the two extra ACs behind the dispatcher), which is how a
// bit-plane codes two symbols in a cycle.
//
// Encoding follows the standard's CODEMPS/CODELPS, RENORME and BYTEOUT
// procedures, including bit stuffing after 0xFF and carry propagation into
// the pending byte. Renormalisation shifts at most 15 bits, so at most two
// bytes leave per decision. With `flush` set (and `valid` clear) the step
// instead terminates the code word (standard FLUSH: SETBITS, two BYTEOUTs,
// then the last byte unless it is 0xFF) and may emit up to three bytes.
// Bytes come out in order in out_byte[0..out_n-1]. Doing one decision per
// cycle per AC follows the reference architecture; the rest is the standard's coder.
module mq_ac
  import jp2k_pkg::*;
(
  input  logic       valid,      // code one decision
  input  logic       flush,      // terminate the code word
  input  mq_reg_t    r_in,
  input  ctx_state_t cx_in,      // state of the decision's context
  input  logic       d,          // the decision
  output mq_reg_t    r_out,
  output ctx_state_t cx_out,
  output logic [1:0] out_n,      // bytes emitted, 0..3
  output logic [7:0] out_byte [3]
);

  // BYTEOUT: the pending byte B becomes final, and is emitted, whenever the
  // standard advances its byte pointer. Returns the updated registers and
  // {emitted, byte}.
  typedef struct packed {
    mq_reg_t    r;
    logic [8:0] emit;
  } bo_t;

  function automatic bo_t byteout(input mq_reg_t r_i);
    mq_reg_t r;
    logic stuff;
    logic [8:0] emit;
    r = r_i;
    stuff = 1'b0;
    if (r.b == 8'hFF) begin
      stuff = 1'b1;
    end else if (r.c >= 32'h0800_0000) begin
      r.b = r.b + 8'd1;
      if (r.b == 8'hFF) begin
        r.c   = r.c & 32'h07FF_FFFF;
        stuff = 1'b1;
      end
    end
    emit = {r.bvalid, r.b};
    r.bvalid = 1'b1;
    if (stuff) begin
      r.b  = 8'(r.c >> 20);
      r.c  = r.c & 32'h000F_FFFF;
      r.ct = 4'd7;
    end else begin
      r.b  = 8'(r.c >> 19);
      r.c  = r.c & 32'h0007_FFFF;
      r.ct = 4'd8;
    end
    return '{r: r, emit: emit};
  endfunction

  always_comb begin
    mq_reg_t     r;
    logic [15:0] qe;
    logic [31:0] tempc;
    logic [8:0]  e;
    bo_t         bo;
    logic [1:0]  n;

    r      = r_in;
    e      = '0;
    bo     = '0;
    tempc  = '0;
    cx_out = cx_in;
    n      = 2'd0;
    out_byte[0] = 8'd0;
    out_byte[1] = 8'd0;
    out_byte[2] = 8'd0;
    qe = mq_qe(cx_in.idx);

    if (valid) begin
      r.a = r.a - qe;
      if (d == cx_in.mps) begin
        // CODEMPS
        if (r.a[15] == 1'b0) begin
          if (r.a < qe) r.a = qe;
          else          r.c = r.c + {16'd0, qe};
          cx_out.idx = mq_nmps(cx_in.idx);
        end else begin
          r.c = r.c + {16'd0, qe};
        end
      end else begin
        // CODELPS
        if (r.a < qe) r.c = r.c + {16'd0, qe};
        else          r.a = qe;
        if (mq_switch(cx_in.idx)) cx_out.mps = ~cx_in.mps;
        cx_out.idx = mq_nlps(cx_in.idx);
      end
      // RENORME, unrolled: at most 15 shifts
      for (int i = 0; i < 16; i++) begin
        if (r.a[15] == 1'b0) begin
          r.a  = r.a << 1;
          r.c  = r.c << 1;
          r.ct = r.ct - 4'd1;
          if (r.ct == 4'd0) begin
            bo = byteout(r);
            r  = bo.r;
            e  = bo.emit;
            if (e[8]) begin
              out_byte[n] = e[7:0];
              n = n + 2'd1;
            end
          end
        end
      end
    end else if (flush) begin
      // SETBITS
      tempc = r.c + {16'd0, r.a};
      r.c   = r.c | 32'h0000_FFFF;
      if (r.c >= tempc) r.c = r.c - 32'h0000_8000;
      for (int i = 0; i < 2; i++) begin
        r.c = r.c << r.ct;
        bo = byteout(r);
        r  = bo.r;
        e  = bo.emit;
        if (e[8]) begin
          out_byte[n] = e[7:0];
          n = n + 2'd1;
        end
      end
      if (r.bvalid && r.b != 8'hFF) begin
        out_byte[n] = r.b;
        n = n + 2'd1;
      end
      r = MQ_INIT;
    end

    r_out = r;
    out_n = n;
  end

endmodule
