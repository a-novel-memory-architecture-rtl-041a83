// Two-level on-chip memory for a video signal processor with four function
// units.
//
// Memory A (memory_a) is the large input buffer: sixteen byte banks filled
// 32 bits per clock from the DMA input. Memory B (memory_b) is the parallel
// working store: sixteen 8-bit read columns, four per function unit, built
// from one-read-one-write banks. A multi-port memory is emulated by writing
// every datum into each read column that needs it. Four 32-bit buses carry
// bank-A words or direct DMA words down to Memory B, and switches on them
// (bus_switch) let Memory B act as one 16-read/4-write memory, two
// 8-read/2-write memories or four 4-read/1-write memories. Function-unit
// results (16 bits each) are written back into Memory B.
//
// Nothing here sequences the memory: every address, SEL1/SEL2 setting and
// switch setting is an input, driven each clock by the processor's control.
//
// Timing: clock t, a_re/a_raddr read Memory A; clock t+1, the words are on
// the buses and a bank B with bwr.we high writes one of them at the end of
// that clock; clock t+2, rd_en/rd_addr read Memory B; rd_data is valid in
// clock t+3. DMA and function-unit words written into Memory B skip the
// first step. A bank-B write whose source is cut off by the switches is
// dropped, flagged on wr_illegal and reported by an assertion.
module vsp_memory
  import vsp_mem_pkg::*;
#(
  parameter int A_DEPTH   = 192,
  parameter int N_STACK   = 4,
  parameter int SUB_DEPTH = 16,
  localparam int AAW = $clog2(A_DEPTH),
  localparam int SAW = $clog2(SUB_DEPTH),
  localparam int STW = (N_STACK > 1) ? $clog2(N_STACK) : 1,
  localparam int RAW = STW + 2 + SAW
) (
  input  logic                                         clk,
  // DMA input into Memory A
  input  logic                                         dma_we,
  input  logic [AAW-1:0]                               dma_waddr,
  input  logic [N_GROUPS-1:0]                          dma_gmask,
  input  logic [BUS_W-1:0]                             dma_wdata,
  // Memory A reads onto the buses
  input  logic [N_GROUPS-1:0]                          a_re,
  input  logic [N_GROUPS-1:0][AAW-1:0]                 a_raddr,
  // bus switches
  input  logic [N_GROUPS-1:0]                          bus_from_dma,
  input  part_e                                        part,
  // Memory B writes
  input  bwr_t [N_GROUPS-1:0][N_STACK-1:0]             bwr,
  input  logic [N_GROUPS-1:0][HALF_W-1:0]              fu_result,
  // Memory B read ports, four per function unit
  input  logic [N_GROUPS-1:0][N_COLS-1:0]              rd_en,
  input  logic [N_GROUPS-1:0][N_COLS-1:0][RAW-1:0]     rd_addr,
  output logic [N_GROUPS-1:0][N_COLS-1:0][BYTE_W-1:0]  rd_data,
  output logic [N_GROUPS-1:0][N_STACK-1:0]             wr_illegal
);

  logic [N_GROUPS-1:0][BUS_W-1:0]                a_rdata;
  logic [N_GROUPS-1:0][N_GROUPS-1:0][BUS_W-1:0]  bus_view;
  logic [N_GROUPS-1:0][N_GROUPS-1:0]             vis;

  memory_a #(.A_DEPTH(A_DEPTH)) u_mem_a (
    .clk       (clk),
    .dma_we    (dma_we),
    .dma_waddr (dma_waddr),
    .dma_gmask (dma_gmask),
    .dma_wdata (dma_wdata),
    .a_re      (a_re),
    .a_raddr   (a_raddr),
    .a_rdata   (a_rdata)
  );

  bus_switch u_switch (
    .part         (part),
    .bus_from_dma (bus_from_dma),
    .dma_data     (dma_wdata),
    .a_rdata      (a_rdata),
    .bus_view     (bus_view),
    .vis          (vis)
  );

  memory_b #(.N_STACK(N_STACK), .SUB_DEPTH(SUB_DEPTH)) u_mem_b (
    .clk        (clk),
    .bus_view   (bus_view),
    .vis        (vis),
    .fu_result  (fu_result),
    .bwr        (bwr),
    .rd_en      (rd_en),
    .rd_addr    (rd_addr),
    .rd_data    (rd_data),
    .wr_illegal (wr_illegal)
  );

  always_ff @(posedge clk) begin
    assert (wr_illegal == '0)
      else $error("vsp_memory: bank B write from a source the switches cut off: %h", wr_illegal);
  end

endmodule
