// Memory B: the lower, highly parallel level.
//
// N_GROUPS groups of N_STACK stacked bank B's (16 bank B's, 4 KB at the
// defaults). It offers sixteen 8-bit read ports, four per group, and a
// write port on every bank B, whose 16-bit data a bank_b_wmux takes from a
// reachable bus half or function-unit result. A write whose source is cut
// off by the bus switches is dropped and flagged in wr_illegal.
//
// Used with duplication, the sixteen read columns act as one
// 16-read/4-write memory, two 8-read/2-write or four 4-read/1-write ones,
// each holding 256 bytes (one read column), or as sixteen independent
// one-read memories holding 4 KB.
//
// The bus partition reaches this level only through vis.
//
// Timing: a write lands at the clock edge where bwr.we is high; rd_data is
// valid one clock after rd_en and holds until the next read.
module memory_b
  import vsp_mem_pkg::*;
#(
  parameter int N_STACK   = 4,
  parameter int SUB_DEPTH = 16,
  localparam int SAW = $clog2(SUB_DEPTH),
  localparam int STW = (N_STACK > 1) ? $clog2(N_STACK) : 1,
  localparam int RAW = STW + 2 + SAW
) (
  input  logic                                           clk,
  input  logic [N_GROUPS-1:0][N_GROUPS-1:0][BUS_W-1:0]   bus_view,
  input  logic [N_GROUPS-1:0][N_GROUPS-1:0]              vis,
  input  logic [N_GROUPS-1:0][HALF_W-1:0]                fu_result,
  input  bwr_t [N_GROUPS-1:0][N_STACK-1:0]               bwr,
  input  logic [N_GROUPS-1:0][N_COLS-1:0]                rd_en,
  input  logic [N_GROUPS-1:0][N_COLS-1:0][RAW-1:0]       rd_addr,
  output logic [N_GROUPS-1:0][N_COLS-1:0][BYTE_W-1:0]    rd_data,
  output logic [N_GROUPS-1:0][N_STACK-1:0]               wr_illegal
);

  for (genvar g = 0; g < N_GROUPS; g++) begin : g_grp
    logic [N_STACK-1:0]                 we;
    logic [N_STACK-1:0][SAW-1:0]        waddr;
    logic [N_STACK-1:0][N_ROWS-1:0]     sel1;
    logic [N_STACK-1:0][1:0][1:0]       sel2;
    logic [N_STACK-1:0][HALF_W-1:0]     wdata;
    logic [N_STACK-1:0]                 legal;

    for (genvar s = 0; s < N_STACK; s++) begin : g_wm
      bank_b_wmux u_wmux (
        .src       (bwr[g][s].src),
        .idx       (bwr[g][s].idx),
        .half      (bwr[g][s].half),
        .bus_view  (bus_view[g]),
        .vis       (vis[g]),
        .fu_result (fu_result),
        .wdata     (wdata[s]),
        .legal     (legal[s])
      );
      assign we[s]    = bwr[g][s].we && legal[s];
      assign waddr[s] = bwr[g][s].waddr[SAW-1:0];
      assign sel1[s]  = bwr[g][s].sel1;
      assign sel2[s]  = bwr[g][s].sel2;
      assign wr_illegal[g][s] = bwr[g][s].we && !legal[s];
    end

    memory_b_group #(.N_STACK(N_STACK), .SUB_DEPTH(SUB_DEPTH)) u_grp (
      .clk   (clk),
      .we    (we),
      .waddr (waddr),
      .sel1  (sel1),
      .sel2  (sel2),
      .wdata (wdata),
      .re    (rd_en[g]),
      .raddr (rd_addr[g]),
      .rdata (rd_data[g])
    );
  end

endmodule
