// Write-data multiplexer in front of one bank B.
//
// Picks the 16-bit word a bank B writes: either the low or high half of one
// of the four buses as seen from the bank's group, or the 16-bit result of
// one of the four function units. A source is legal only if the bus
// switches connect it to this group (vis); otherwise the output is zero and
// legal is low, and the write must be dropped.
//
// Purely combinational. The 32-bit bus, its two 16-bit halves and the
// function-unit results as sources follow the published organisation; the
// legality rule for function units follows the bus partition by this
// design's choice.
module bank_b_wmux
  import vsp_mem_pkg::*;
(
  input  bsrc_e                           src,
  input  logic [GW-1:0]                   idx,
  input  logic                            half,
  input  logic [N_GROUPS-1:0][BUS_W-1:0]  bus_view,
  input  logic [N_GROUPS-1:0]             vis,
  input  logic [N_GROUPS-1:0][HALF_W-1:0] fu_result,
  output logic [HALF_W-1:0]               wdata,
  output logic                            legal
);

  always_comb begin
    legal = vis[idx];
    if (!legal)
      wdata = '0;
    else if (src == SRC_FU)
      wdata = fu_result[idx];
    else
      wdata = half ? bus_view[idx][BUS_W-1:HALF_W] : bus_view[idx][HALF_W-1:0];
  end

endmodule
