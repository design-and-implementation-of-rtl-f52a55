// Bit-stream controller (BSC) with its bit-stream buffer.
//
// The EBC's lanes each produce the code word of one bit-plane, 0 to 4
// bytes per cycle per lane. The BSC buffers each lane's output in its own
// FIFO, together with an end-of-code-word marker carrying the bit-plane
// number, and drains the FIFOs one entry per cycle in round-robin order
// towards the memory interface, each entry tagged with its bit-plane. When
// any FIFO has less room than two cycles of a lane's worst-case output it
// raises `stall`, which freezes the EBC until the buffer drains. The
// stall is combinational from the FIFO counts, so the EBC sees it in the
// same cycle; the threshold leaves room for two cycles of output. NL must
// be a power of two (round-robin pointer wraps).
//
// The overflow assertion at the end is disabled during reset; lint tools
// report that as rst_n being used both asynchronously and synchronously,
// which concerns only that assertion.
//
// The reference architecture only names the BSC and its bit-stream buffer; the per-lane
// FIFOs, their depth, the round-robin drain and the stall rule are this
// design's choices. Output handshake: an entry leaves when out_valid and
// out_ready are both high.
module bsc
  import jp2k_pkg::*;
#(
  parameter int unsigned NL    = NPAR,
  parameter int unsigned MW    = MAG_W,
  parameter int unsigned DEPTH = 64,    // entries per lane FIFO
  localparam int unsigned KW = $clog2(MW),
  localparam int unsigned PW = $clog2(DEPTH)
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [2:0]    lane_n    [NL],
  input  logic [7:0]    lane_byte [NL][4],
  input  logic          lane_eop  [NL],
  input  logic [KW-1:0] lane_k    [NL],
  output logic          stall,
  output logic          out_valid,
  input  logic          out_ready,
  output logic          out_eop,       // end of the bit-plane's code word (no byte)
  output logic [KW-1:0] out_k,
  output logic [7:0]    out_byte,
  output logic          empty
);

  typedef struct packed {
    logic          eop;
    logic [KW-1:0] k;
    logic [7:0]    b;
  } entry_t;

  entry_t        fifo [NL][DEPTH];
  logic [PW-1:0] wp [NL];
  logic [PW-1:0] rp [NL];
  logic [PW:0]   cnt [NL];
  logic [$clog2(NL)-1:0] rr;       // lane served next
  logic [$clog2(NL)-1:0] sel;
  logic          any;

  // lane to drain: first non-empty lane at or after rr
  always_comb begin
    logic [$clog2(NL)-1:0] l;
    any = 1'b0;
    sel = rr;
    for (int i = 0; i < int'(NL); i++) begin
      l = rr + $clog2(NL)'(i);       // wraps: NL is a power of two
      if (!any && cnt[l] != '0) begin
        any = 1'b1;
        sel = l;
      end
    end
  end

  assign out_valid = any;
  assign out_eop   = fifo[sel][rp[sel]].eop;
  assign out_k     = fifo[sel][rp[sel]].k;
  assign out_byte  = fifo[sel][rp[sel]].b;

  always_comb begin
    stall = 1'b0;
    empty = 1'b1;
    for (int l = 0; l < int'(NL); l++) begin
      if (int'(cnt[l]) > int'(DEPTH) - 2 * 5) stall = 1'b1;
      if (cnt[l] != '0) empty = 1'b0;
    end
  end

  // entries written and read per lane this cycle
  logic [2:0] push_n [NL];
  logic       pop    [NL];
  always_comb
    for (int l = 0; l < int'(NL); l++) begin
      push_n[l] = lane_n[l] + 3'(lane_eop[l]);
      pop[l]    = any && out_ready && (sel == $clog2(NL)'(l));
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= '0;
      for (int l = 0; l < int'(NL); l++) begin
        wp[l]  <= '0;
        rp[l]  <= '0;
        cnt[l] <= '0;
      end
    end else begin
      for (int l = 0; l < int'(NL); l++) begin
        wp[l]  <= wp[l] + PW'(push_n[l]);
        if (pop[l]) rp[l] <= rp[l] + 1'b1;
        cnt[l] <= cnt[l] + (PW+1)'(push_n[l]) - (PW+1)'(pop[l]);
      end
      if (any && out_ready) rr <= sel + 1'b1;
    end
  end

  // FIFO storage (no reset)
  always_ff @(posedge clk) begin
    for (int l = 0; l < int'(NL); l++) begin
      for (int i = 0; i < 4; i++)
        if (i < int'(lane_n[l]))
          fifo[l][PW'(int'(wp[l]) + i)] <= '{eop: 1'b0, k: lane_k[l], b: lane_byte[l][i]};
      if (lane_eop[l])
        fifo[l][PW'(int'(wp[l]) + int'(lane_n[l]))] <= '{eop: 1'b1, k: lane_k[l], b: 8'd0};
    end
  end

  // an overflowing FIFO would lose code-stream bytes
  for (genvar l = 0; l < NL; l++) begin : g_chk
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) int'(cnt[l]) <= int'(DEPTH))
      else $error("bsc: lane %0d FIFO overflow", l);
  end

endmodule
