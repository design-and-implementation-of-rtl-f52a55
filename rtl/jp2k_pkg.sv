// Shared constants, types and coding tables of the bit-plane parallel
// JPEG 2000 encoder.
//
// The code-block geometry (64x64 samples, four-row stripes), the ten
// magnitude bit-planes and the four parallel bit-planes of the EBC follow
// the reference architecture. The nineteen coding contexts and the MQ probability table are
// those of the JPEG 2000 standard (ITU-T T.800, Annexes C and D); they are
// written here as functions so that every block uses one copy.
package jp2k_pkg;

  localparam int unsigned CB_DIM  = 64;  // code-block width and height
  localparam int unsigned MAG_W   = 10;  // magnitude bit-planes of a coefficient
  localparam int unsigned NPAR    = 4;   // bit-planes coded in parallel by the EBC
  localparam int unsigned WIN     = 8;   // coefficients per data-conversion window (2 stripe columns)

  // Context numbers: 0..8 zero coding, 9..13 sign coding, 14..16 magnitude
  // refinement, 17 run-length, 18 uniform.
  localparam logic [4:0] CTX_RL  = 5'd17;
  localparam logic [4:0] CTX_UNI = 5'd18;

  typedef enum logic [1:0] {
    BAND_LL = 2'd0,
    BAND_HL = 2'd1,
    BAND_LH = 2'd2,
    BAND_HH = 2'd3
  } band_e;

  // One binary decision for the arithmetic coder.
  typedef struct packed {
    logic [4:0] ctx;
    logic       bit_;
  } sym_t;

  // Probability state of one context.
  typedef struct packed {
    logic [5:0] idx;
    logic       mps;
  } ctx_state_t;

  // MQ coder registers (standard names A, C, CT, B) plus a flag telling
  // whether B already holds a byte of the code stream.
  typedef struct packed {
    logic [15:0] a;
    logic [31:0] c;
    logic [3:0]  ct;
    logic [7:0]  b;
    logic        bvalid;
  } mq_reg_t;

  localparam mq_reg_t MQ_INIT = '{a: 16'h8000, c: 32'd0, ct: 4'd12, b: 8'd0, bvalid: 1'b0};

  // Initial probability state of a context (standard Table D.7).
  function automatic ctx_state_t ctx_init(input logic [4:0] ctx);
    ctx_state_t s;
    s.mps = 1'b0;
    if (ctx == 5'd0)        s.idx = 6'd4;
    else if (ctx == CTX_RL) s.idx = 6'd3;
    else if (ctx == CTX_UNI) s.idx = 6'd46;
    else                    s.idx = 6'd0;
    return s;
  endfunction

  // MQ probability estimation table (standard Table C.2): Qe, next index on
  // MPS, next index on LPS, MPS switch flag.
  function automatic logic [15:0] mq_qe(input logic [5:0] i);
    case (i)
      6'd0: return 16'h5601;  6'd1: return 16'h3401;  6'd2: return 16'h1801;
      6'd3: return 16'h0AC1;  6'd4: return 16'h0521;  6'd5: return 16'h0221;
      6'd6: return 16'h5601;  6'd7: return 16'h5401;  6'd8: return 16'h4801;
      6'd9: return 16'h3801;  6'd10: return 16'h3001; 6'd11: return 16'h2401;
      6'd12: return 16'h1C01; 6'd13: return 16'h1601; 6'd14: return 16'h5601;
      6'd15: return 16'h5401; 6'd16: return 16'h5101; 6'd17: return 16'h4801;
      6'd18: return 16'h3801; 6'd19: return 16'h3401; 6'd20: return 16'h3001;
      6'd21: return 16'h2801; 6'd22: return 16'h2401; 6'd23: return 16'h2201;
      6'd24: return 16'h1C01; 6'd25: return 16'h1801; 6'd26: return 16'h1601;
      6'd27: return 16'h1401; 6'd28: return 16'h1201; 6'd29: return 16'h1101;
      6'd30: return 16'h0AC1; 6'd31: return 16'h09C1; 6'd32: return 16'h08A1;
      6'd33: return 16'h0521; 6'd34: return 16'h0441; 6'd35: return 16'h02A1;
      6'd36: return 16'h0221; 6'd37: return 16'h0141; 6'd38: return 16'h0111;
      6'd39: return 16'h0085; 6'd40: return 16'h0049; 6'd41: return 16'h0025;
      6'd42: return 16'h0015; 6'd43: return 16'h0009; 6'd44: return 16'h0005;
      6'd45: return 16'h0001; default: return 16'h5601;
    endcase
  endfunction

  function automatic logic [5:0] mq_nmps(input logic [5:0] i);
    case (i)
      6'd5: return 6'd38;
      6'd13: return 6'd29;
      6'd45, 6'd46: return i;
      default: return i + 6'd1;
    endcase
  endfunction

  function automatic logic [5:0] mq_nlps(input logic [5:0] i);
    case (i)
      6'd0: return 6'd1;   6'd1: return 6'd6;   6'd2: return 6'd9;   6'd3: return 6'd12;
      6'd4: return 6'd29;  6'd5: return 6'd33;  6'd6: return 6'd6;   6'd7: return 6'd14;
      6'd8: return 6'd14;  6'd9: return 6'd14;  6'd10: return 6'd17; 6'd11: return 6'd18;
      6'd12: return 6'd20; 6'd13: return 6'd21; 6'd14: return 6'd14; 6'd15: return 6'd14;
      6'd16: return 6'd15; 6'd17: return 6'd16; 6'd18: return 6'd17; 6'd19: return 6'd18;
      6'd20: return 6'd19; 6'd21: return 6'd19; 6'd46: return 6'd46;
      default: return i - 6'd2;  // entries 22..45 step back by two
    endcase
  endfunction

  function automatic logic mq_switch(input logic [5:0] i);
    return (i == 6'd0) || (i == 6'd6) || (i == 6'd14);
  endfunction

  // Zero-coding context from the counts of significant horizontal (0..2),
  // vertical (0..2) and diagonal (0..4) neighbours (standard Table D.1).
  function automatic logic [4:0] zc_ctx(input band_e band, input logic [1:0] h_in,
                                        input logic [1:0] v_in, input logic [2:0] d);
    logic [1:0] h, v;
    logic [2:0] hv;
    h = (band == BAND_HL) ? v_in : h_in;
    v = (band == BAND_HL) ? h_in : v_in;
    if (band == BAND_HH) begin
      hv = {1'b0, h} + {1'b0, v};
      if (d >= 3'd3)      return 5'd8;
      else if (d == 3'd2) return (hv >= 3'd1) ? 5'd7 : 5'd6;
      else if (d == 3'd1) return (hv >= 3'd2) ? 5'd5 : (hv == 3'd1) ? 5'd4 : 5'd3;
      else                return (hv >= 3'd2) ? 5'd2 : (hv == 3'd1) ? 5'd1 : 5'd0;
    end
    if (h == 2'd2)      return 5'd8;
    else if (h == 2'd1) return (v != 2'd0) ? 5'd7 : (d != 3'd0) ? 5'd6 : 5'd5;
    else if (v == 2'd2) return 5'd4;
    else if (v == 2'd1) return 5'd3;
    else                return (d >= 3'd2) ? 5'd2 : (d == 3'd1) ? 5'd1 : 5'd0;
  endfunction

  // Contribution of a pair of neighbours to the sign context: -1, 0 or +1,
  // encoded as {negative, positive}.
  function automatic logic [1:0] sc_contrib(input logic sig0, input logic neg0,
                                            input logic sig1, input logic neg1);
    int s;
    s = (sig0 ? (neg0 ? -1 : 1) : 0) + (sig1 ? (neg1 ? -1 : 1) : 0);
    if (s > 0) return 2'b01;
    if (s < 0) return 2'b10;
    return 2'b00;
  endfunction

  // Sign-coding context and the bit the sign is XORed with (Table D.3).
  // hc and vc are sc_contrib results.
  function automatic logic [5:0] sc_ctx_xor(input logic [1:0] hc, input logic [1:0] vc);
    logic [4:0] ctx;
    logic x;
    unique case (hc)
      2'b01: begin
        x = 1'b0;
        ctx = (vc == 2'b01) ? 5'd13 : (vc == 2'b00) ? 5'd12 : 5'd11;
      end
      2'b10: begin
        x = 1'b1;
        ctx = (vc == 2'b10) ? 5'd13 : (vc == 2'b00) ? 5'd12 : 5'd11;
      end
      default: begin
        x = (vc == 2'b10);
        ctx = (vc == 2'b00) ? 5'd9 : 5'd10;
      end
    endcase
    return {ctx, x};
  endfunction

endpackage
