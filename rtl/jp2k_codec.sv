// JPEG 2000 encoder datapath with a bit-plane scalable EBC: the chip level
// below the DWT.
//
// DWT coefficients of a code-block arrive one per cycle in EBC scan order
// (stripe by stripe, column by column, four rows per column). Three things
// happen to them:
//  1. The RDO controller (pre_rdo) watches them go by and, when the block
//     is complete, decides which bit-planes are worth coding: the top
//     non-blank bit-plane nbp-1 down to kend.
//  2. The data conversion (dataconv_enc) turns each window of eight
//     coefficients into one group word per bit-plane, with each sign
//     placed right after its coefficient's first 1 bit, and the embedded
//     compression (ec_rlc_enc) shortens all-zero groups to a single bit.
//     Each coded group goes to the off-chip tile memory as one record.
//  3. After the decision, only the records of bit-planes nbp-1..kend are
//     read back, expanded (ec_rlc_dec, dataconv_dec) into the EBC's
//     code-block buffer, and the EBC codes those bit-planes, four at a
//     time. The bit-stream controller (bsc) buffers the lanes' code words
//     and hands them out one byte per cycle, tagged with their bit-plane;
//     when its buffer fills up it stalls the EBC.
// The main controller below sequences the three phases for one code-block
// after another.
//
// Tile-memory interface: one record per (bit-plane, window), at address
// k * (CB*CB/8) + window, holding the left-aligned code word and its
// length. Reads return data one cycle after tm_re. The tile memory itself
// (SDRAM in the reference architecture) is outside this module. The counters tm_wbits and
// tm_rbits add up the code-word bits written and read, for measuring the
// bandwidth the data conversion and embedded compression save. len_err
// is set if a record read back does not parse to its stored length.
//
// Following the reference architecture: the blocks and their connection (DWT
// excepted), coding only the chosen bit-planes, bit-plane data in the tile
// memory, four lanes with two extra ACs. This design's choices: the record
// layout, one coefficient per cycle in, the sequential (not overlapped)
// phases, the rate estimate inside pre_rdo, and a code-block at a time.
module jp2k_codec
  import jp2k_pkg::*;
#(
  parameter int unsigned CB  = CB_DIM,
  parameter int unsigned MW  = MAG_W,
  parameter int unsigned BSC_DEPTH = 64,   // bytes buffered per lane
  localparam int unsigned KW  = $clog2(MW),
  localparam int unsigned AW  = $clog2(CB * CB),
  localparam int unsigned NWIN = CB * CB / WIN,
  localparam int unsigned WW  = $clog2(NWIN),
  localparam int unsigned TAW = KW + WW,
  localparam int unsigned CLW = $clog2(2 * WIN + 2),
  localparam int unsigned RW  = $clog2(CB * CB + 1) + 2 + KW
)(
  input  logic           clk,
  input  logic           rst_n,
  // coefficients from the DWT, EBC scan order, sign-magnitude
  input  logic           cf_valid,
  output logic           cf_ready,
  input  logic [MW-1:0]  cf_mag,
  input  logic           cf_sgn,
  input  band_e          cf_band,      // sampled with the first coefficient
  input  logic [RW-1:0]  cf_budget,    // sampled with the last coefficient
  // tile memory (off-chip)
  output logic           tm_we,
  output logic [TAW-1:0] tm_waddr,
  output logic [2*WIN:0] tm_wdata,
  output logic [CLW-1:0] tm_wlen,
  output logic           tm_re,
  output logic [TAW-1:0] tm_raddr,
  input  logic [2*WIN:0] tm_rdata,
  input  logic [CLW-1:0] tm_rlen,
  // embedded bit-streams
  output logic           bs_valid,
  input  logic           bs_ready,
  output logic           bs_eop,
  output logic [KW-1:0]  bs_k,
  output logic [7:0]     bs_byte,
  // status
  output logic           blk_done,     // pulse: a code-block is finished
  output logic [KW:0]    blk_nbp,
  output logic [KW-1:0]  blk_kend,
  output logic [31:0]    tm_wbits,
  output logic [31:0]    tm_rbits,
  output logic [31:0]    tm_rblank,    // blank (one-bit) records read
  output logic [RW-1:0]  blk_est,      // RDO's bit estimate
  output logic [31:0]    cnt_dual,     // lane-cycles with two decisions
  output logic [31:0]    cnt_extra,    // extra cycles for want of an extra AC
  output logic [31:0]    cnt_stall,    // cycles the BSC stalled the EBC
  output logic           len_err
);

  typedef enum logic [2:0] {M_ING, M_CONV, M_DECIDE, M_RD, M_RDW, M_LOAD, M_CODE, M_DONE} mst_e;
  mst_e mst;

  // ------------------------------------------------- ingest and convert
  logic [MW-1:0] wmag [WIN];
  logic          wsgn [WIN];
  logic [$clog2(WIN)-1:0] wcnt;
  logic [WW-1:0] win;
  logic [AW-1:0] ccnt;             // coefficients of the block so far
  logic          blk_last;         // the window being converted is the last
  logic [KW-1:0] kc;               // bit-plane being converted
  band_e         band_q;
  logic          rdo_seen;         // the RDO decision for this block is in
  logic          started;          // the EBC has taken this block

  logic [2*WIN-1:0] dc_code;
  logic [$clog2(2*WIN+1)-1:0] dc_len;
  logic          dc_blank;
  logic [2*WIN:0] ec_code;
  logic [CLW-1:0] ec_len;

  assign cf_ready = (mst == M_ING);

  dataconv_enc #(.MW(MW), .NW(WIN)) u_dce (
    .mag (wmag), .sgn (wsgn), .k (kc),
    .code (dc_code), .len (dc_len), .blank (dc_blank)
  );

  ec_rlc_enc #(.NW(WIN)) u_ece (
    .raw (dc_code), .raw_len (dc_len), .blank (dc_blank),
    .code (ec_code), .code_len (ec_len)
  );

  assign tm_we    = (mst == M_CONV);
  assign tm_waddr = TAW'(int'(kc) * int'(NWIN) + int'(win));
  assign tm_wdata = ec_code;
  assign tm_wlen  = ec_len;

  // ------------------------------------------------------------- pre-RDO
  logic          rdo_valid;
  logic [KW:0]   rdo_nbp;
  logic [KW-1:0] rdo_kend;
  logic [RW-1:0] rdo_est;

  pre_rdo #(.MW(MW), .CB(CB)) u_rdo (
    .clk (clk), .rst_n (rst_n),
    .valid (cf_valid && cf_ready),
    .first (ccnt == '0),
    .last  (ccnt == AW'(CB * CB - 1)),
    .mag (cf_mag), .budget (cf_budget),
    .res_valid (rdo_valid), .nbp (rdo_nbp), .kend (rdo_kend), .est_bits (rdo_est)
  );

  // ------------------------------------------------- read back and expand
  logic [KW-1:0] kr;
  logic [KW:0]   nbp_q;
  logic [KW-1:0] kend_q;
  logic [2*WIN-1:0] ecd_raw;
  logic          ecd_blank;
  logic [$clog2(2*WIN+1)-1:0] dcd_used;
  logic [CLW-1:0] ecd_len;
  logic [MW-1:0] dmag [WIN];
  logic          dsgn [WIN];

  assign tm_re    = (mst == M_RD);
  assign tm_raddr = TAW'(int'(kr) * int'(NWIN) + int'(win));

  ec_rlc_dec #(.NW(WIN)) u_ecd (
    .code (tm_rdata), .raw (ecd_raw), .blank (ecd_blank),
    .raw_used (dcd_used), .code_len (ecd_len)
  );

  dataconv_dec #(.MW(MW), .NW(WIN)) u_dcd (
    .clk (clk), .rst_n (rst_n),
    .clear (mst == M_RDW && kr == KW'(nbp_q - 1'b1)),
    .valid (mst == M_RDW),
    .k (kr), .code (ecd_raw), .used (dcd_used),
    .mag (dmag), .sgn (dsgn)
  );

  // ------------------------------------------------------------ EBC, BSC
  logic          ebc_busy, ebc_stall;
  logic [2:0]    lane_n    [NPAR];
  logic [7:0]    lane_byte [NPAR][4];
  logic          lane_eop  [NPAR];
  logic [KW-1:0] lane_k    [NPAR];
  logic [2:0]    evt_dual, evt_extra;
  logic          bsc_empty;

  ebc #(.CB(CB), .MW(MW), .NL(NPAR)) u_ebc (
    .clk (clk), .rst_n (rst_n),
    .ld_valid (mst == M_LOAD),
    .ld_addr  (AW'(int'(win) * int'(WIN))),
    .ld_mag   (dmag), .ld_sgn (dsgn),
    .start (mst == M_CODE && !ebc_busy && !started),
    .band (band_q), .nbp (nbp_q), .kend (kend_q),
    .busy (ebc_busy), .stall (ebc_stall),
    .lane_n (lane_n), .lane_byte (lane_byte), .lane_eop (lane_eop), .lane_k (lane_k),
    .evt_dual (evt_dual), .evt_extra (evt_extra)
  );

  bsc #(.NL(NPAR), .MW(MW), .DEPTH(BSC_DEPTH)) u_bsc (
    .clk (clk), .rst_n (rst_n),
    .lane_n (lane_n), .lane_byte (lane_byte), .lane_eop (lane_eop), .lane_k (lane_k),
    .stall (ebc_stall),
    .out_valid (bs_valid), .out_ready (bs_ready), .out_eop (bs_eop),
    .out_k (bs_k), .out_byte (bs_byte), .empty (bsc_empty)
  );

  // ------------------------------------------------------ main controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mst      <= M_ING;
      wcnt     <= '0;
      win      <= '0;
      ccnt     <= '0;
      blk_last <= 1'b0;
      kc       <= '0;
      kr       <= '0;
      nbp_q    <= '0;
      kend_q   <= '0;
      band_q   <= BAND_LL;
      blk_done <= 1'b0;
      tm_wbits <= '0;
      tm_rbits <= '0;
      tm_rblank <= '0;
      cnt_dual <= '0;
      cnt_extra <= '0;
      cnt_stall <= '0;
      len_err  <= 1'b0;
      rdo_seen <= 1'b0;
      started  <= 1'b0;
      for (int i = 0; i < int'(WIN); i++) begin
        wmag[i] <= '0;
        wsgn[i] <= 1'b0;
      end
    end else begin
      blk_done  <= 1'b0;
      cnt_dual  <= cnt_dual + 32'(evt_dual);
      cnt_extra <= cnt_extra + 32'(evt_extra);
      if (ebc_busy && ebc_stall) cnt_stall <= cnt_stall + 1;
      unique case (mst)
        M_ING: if (cf_valid) begin
          if (ccnt == '0) band_q <= cf_band;
          wmag[wcnt] <= cf_mag;
          wsgn[wcnt] <= cf_sgn;
          wcnt <= wcnt + 1'b1;
          ccnt <= ccnt + 1'b1;
          if (wcnt == $clog2(WIN)'(WIN - 1)) begin
            blk_last <= (ccnt == AW'(CB * CB - 1));
            kc  <= KW'(MW - 1);
            mst <= M_CONV;
          end
        end
        M_CONV: begin
          tm_wbits <= tm_wbits + 32'(ec_len);
          if (kc == '0) begin
            win <= win + 1'b1;
            mst <= blk_last ? M_DECIDE : M_ING;
          end else begin
            kc <= kc - 1'b1;
          end
        end
        M_DECIDE: if (rdo_seen) begin
          win <= '0;
          mst <= (nbp_q == '0) ? M_DONE : M_RD;
          kr  <= KW'(nbp_q - 1'b1);
        end
        M_RD: mst <= M_RDW;
        M_RDW: begin
          tm_rbits <= tm_rbits + 32'(tm_rlen);
          if (ecd_len != tm_rlen) len_err <= 1'b1;
          if (ecd_blank) tm_rblank <= tm_rblank + 1;
          if (kr == kend_q) mst <= M_LOAD;
          else begin
            kr  <= kr - 1'b1;
            mst <= M_RD;
          end
        end
        M_LOAD: begin
          if (win == WW'(NWIN - 1)) mst <= M_CODE;
          else begin
            win <= win + 1'b1;
            kr  <= KW'(nbp_q - 1'b1);
            mst <= M_RD;
          end
        end
        M_CODE: if (ebc_busy) started <= 1'b1;
                else if (started && bsc_empty) mst <= M_DONE;
        M_DONE: begin
          blk_done <= 1'b1;
          win  <= '0;
          ccnt <= '0;
          rdo_seen <= 1'b0;
          started  <= 1'b0;
          mst  <= M_ING;
        end
        default: mst <= M_ING;
      endcase
      // latch the RDO decision as soon as it is available
      if (rdo_valid) begin
        rdo_seen <= 1'b1;
        nbp_q  <= rdo_nbp;
        kend_q <= rdo_kend;
      end
    end
  end

  assign blk_nbp  = nbp_q;
  assign blk_kend = kend_q;
  assign blk_est  = rdo_est;

endmodule
