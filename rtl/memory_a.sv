// Memory A: the upper, high-capacity input buffer.
//
// N_GROUPS x 4 one-read-one-write byte banks (sixteen banks, 3 KB at the
// defaults). A DMA write carries a 32-bit word of four pixels and one write
// address shared by all sixteen banks; byte k goes to bank k of every group
// enabled in dma_gmask, so consecutive pixels land in consecutive banks
// (pixel 1, 5, 9, ... in bank 1; pixel 2, 6, 10, ... in bank 2; and so on).
// Each group reads its four banks at its own address as one 32-bit word for
// its bus.
//
// Timing: writes land at the clock edge where dma_we is high; a_rdata[g] is
// valid one clock after a_re[g] and holds until the next read.
//
// The sixteen byte banks, the shared write address, the 32-bit DMA input and
// the pixel interleave are the published structure. A_DEPTH = 192 bytes per
// bank makes 3 KB, the search-area storage needed for a displacement of 16
// with 16x16 macroblocks; the group write mask is this design's addition.
module memory_a
  import vsp_mem_pkg::*;
#(
  parameter int A_DEPTH = 192,
  localparam int AAW = $clog2(A_DEPTH)
) (
  input  logic                                clk,
  input  logic                                dma_we,
  input  logic [AAW-1:0]                      dma_waddr,
  input  logic [N_GROUPS-1:0]                 dma_gmask,
  input  logic [BUS_W-1:0]                    dma_wdata,
  input  logic [N_GROUPS-1:0]                 a_re,
  input  logic [N_GROUPS-1:0][AAW-1:0]        a_raddr,
  output logic [N_GROUPS-1:0][BUS_W-1:0]      a_rdata
);

  localparam int BPG = BUS_W / BYTE_W;   // banks per group

  for (genvar g = 0; g < N_GROUPS; g++) begin : g_grp
    for (genvar k = 0; k < BPG; k++) begin : g_bank
      sram_1r1w #(.DEPTH(A_DEPTH), .WIDTH(BYTE_W)) u_bank (
        .clk   (clk),
        .we    (dma_we && dma_gmask[g]),
        .waddr (dma_waddr),
        .wdata (dma_wdata[k*BYTE_W +: BYTE_W]),
        .re    (a_re[g]),
        .raddr (a_raddr[g]),
        .rdata (a_rdata[g][k*BYTE_W +: BYTE_W])
      );
    end
  end

  // An address past the last word would be lost in a bank.
  always_ff @(posedge clk) begin
    if (dma_we) assert (int'(dma_waddr) < A_DEPTH)
      else $error("memory_a: write address %0d out of range", dma_waddr);
  end

endmodule
