// Single memory bank B.
//
// A 4x4 array of one-read-one-write sub-banks of SUB_DEPTH bytes. Each row
// (data1..data4) stores one byte stream; each column is a read port with its
// own read decoder. One write decoder addresses the same word in every
// sub-bank. A write can copy the same byte into several columns, so that
// several read ports see the same data: this is how the bank emulates a
// multi-port memory.
//
// Write: the 16-bit write word is split into its low byte L and high byte H.
// Rows 1 and 3 take L, rows 2 and 4 take H. SEL1 (4 bits) picks the rows
// written. Rows 1-2 follow sel2[0] and rows 3-4 follow sel2[1]. A SEL2 field
// picks the columns:
//   00 -> columns 1,2,3,4   01 -> columns 1,2   10 -> columns 1,3   11 -> column 1
// Writing one address with SEL2 = 00, 01, 10, 11 on four successive clocks
// leaves the four values in the columns in reverse order of writing.
//
// Read: column c takes re[c] and raddr[c] = {row, word}. The byte appears on
// rdata[c] one clock later and holds until the next read of that column.
//
// The sub-bank size, the row/column array, SEL1/SEL2 and the SEL2 table are
// the published structure. The split of the 16-bit word into rows and the
// one-hot use of SEL1 are this design's reading of the bank drawing.
module bank_b
  import vsp_mem_pkg::*;
#(
  parameter int SUB_DEPTH = 16,
  localparam int SAW = $clog2(SUB_DEPTH),
  localparam int RAW = 2 + SAW
) (
  input  logic                        clk,
  input  logic                        we,
  input  logic [SAW-1:0]              waddr,
  input  logic [N_ROWS-1:0]           sel1,
  input  logic [1:0][1:0]             sel2,
  input  logic [HALF_W-1:0]           wdata,
  input  logic [N_COLS-1:0]           re,
  input  logic [N_COLS-1:0][RAW-1:0]  raddr,
  output logic [N_COLS-1:0][BYTE_W-1:0] rdata
);

  logic [N_ROWS-1:0][N_COLS-1:0]              sub_we;
  logic [N_ROWS-1:0][N_COLS-1:0]              sub_re;
  logic [N_ROWS-1:0][N_COLS-1:0][BYTE_W-1:0]  sub_rdata;
  logic [N_ROWS-1:0][BYTE_W-1:0]              row_wdata;
  logic [N_COLS-1:0][1:0]                     row_q;

  always_comb begin
    for (int r = 0; r < N_ROWS; r++) begin
      row_wdata[r] = (r % 2 == 0) ? wdata[BYTE_W-1:0] : wdata[HALF_W-1:BYTE_W];
      for (int c = 0; c < N_COLS; c++) begin
        sub_we[r][c] = we && sel1[r] && sel2_cols(sel2[r/2])[c];
        sub_re[r][c] = re[c] && (raddr[c][RAW-1:SAW] == 2'(r));
      end
    end
  end

  for (genvar r = 0; r < N_ROWS; r++) begin : g_row
    for (genvar c = 0; c < N_COLS; c++) begin : g_col
      sram_1r1w #(.DEPTH(SUB_DEPTH), .WIDTH(BYTE_W)) u_sub (
        .clk   (clk),
        .we    (sub_we[r][c]),
        .waddr (waddr),
        .wdata (row_wdata[r]),
        .re    (sub_re[r][c]),
        .raddr (raddr[c][SAW-1:0]),
        .rdata (sub_rdata[r][c])
      );
    end
  end

  // Row of the last read of each column, to steer the column's output.
  always_ff @(posedge clk) begin
    for (int c = 0; c < N_COLS; c++)
      if (re[c]) row_q[c] <= raddr[c][RAW-1:SAW];
  end

  always_comb begin
    for (int c = 0; c < N_COLS; c++) rdata[c] = sub_rdata[row_q[c]][c];
  end

endmodule
