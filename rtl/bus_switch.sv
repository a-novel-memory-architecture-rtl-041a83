// Bus switches between Memory A and Memory B.
//
// Four 32-bit buses run across the four groups. Splitting switches decide
// what drives bus j: the 32-bit read word of bank-A group j, or the direct
// DMA input word (bus_from_dma[j]). Concatenating switches join or break
// the bus segments between groups:
//   PART_1: all buses reach all groups (one 16-read-4-write memory B)
//   PART_2: groups 0-1 and groups 2-3 each see only their own two buses
//   PART_4: each group sees only its own bus
// bus_view[g][j] is bus j as seen from group g (zero where the switch is
// open) and vis[g][j] flags that bus j, and function unit j, are reachable
// from group g.
//
// Purely combinational. The four buses, the two kinds of switches, the
// direct input and the 1/2/4-group division are the published structure;
// which bus each group owns and the zero on a broken segment are this
// design's choices.
module bus_switch
  import vsp_mem_pkg::*;
(
  input  part_e                                  part,
  input  logic [N_GROUPS-1:0]                    bus_from_dma,
  input  logic [BUS_W-1:0]                       dma_data,
  input  logic [N_GROUPS-1:0][BUS_W-1:0]         a_rdata,
  output logic [N_GROUPS-1:0][N_GROUPS-1:0][BUS_W-1:0] bus_view,
  output logic [N_GROUPS-1:0][N_GROUPS-1:0]      vis
);

  logic [N_GROUPS-1:0][BUS_W-1:0] bus;

  always_comb begin
    for (int j = 0; j < N_GROUPS; j++)
      bus[j] = bus_from_dma[j] ? dma_data : a_rdata[j];
    for (int g = 0; g < N_GROUPS; g++) begin
      for (int j = 0; j < N_GROUPS; j++) begin
        vis[g][j]      = same_part(part, GW'(g), GW'(j));
        bus_view[g][j] = vis[g][j] ? bus[j] : '0;
      end
    end
  end

endmodule
