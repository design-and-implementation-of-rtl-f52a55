// Behavioural model of the off-chip tile memory (SDRAM in the reference architecture) as
// the codec sees it: one record (code word and its length) per address,
// written in a cycle, read back one cycle after the read request.
// Simulation only; no SDRAM timing, refresh or bursts are modelled.
// Interface and latency are this testbench's choice.
module tile_mem #(
  parameter int AW = 13,
  parameter int DW = 17,
  parameter int LW = 5
)(
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [LW-1:0] wlen,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata,
  output logic [LW-1:0] rlen
);
  logic [DW-1:0] mem_d [1 << AW];
  logic [LW-1:0] mem_l [1 << AW];

  always_ff @(posedge clk) begin
    if (we) begin
      mem_d[waddr] <= wdata;
      mem_l[waddr] <= wlen;
    end
    if (re) begin
      rdata <= mem_d[raddr];
      rlen  <= mem_l[raddr];
    end
  end
endmodule
