// One read column group of Memory B.
//
// N_STACK bank B's stacked on cascaded read bit lines. Read column c of the
// group runs through column c of every stacked bank, so each of the four
// read ports addresses N_STACK x 4 rows x SUB_DEPTH bytes (256 bytes at the
// defaults) with the address {stack, row, word}. Each stacked bank keeps its
// own write port, so up to N_STACK writes land in the group per clock.
//
// Timing: rdata[c] is valid one clock after re[c] and holds until the next
// read of that column. Writes follow bank_b.
//
// The stacking of four bank B's per column and the cascaded read lines are
// the published organisation; the address layout is this design's choice.
module memory_b_group
  import vsp_mem_pkg::*;
#(
  parameter int N_STACK   = 4,
  parameter int SUB_DEPTH = 16,
  localparam int SAW = $clog2(SUB_DEPTH),
  localparam int STW = (N_STACK > 1) ? $clog2(N_STACK) : 1,
  localparam int BAW = 2 + SAW,          // address inside one bank B
  localparam int RAW = STW + BAW         // address along a read column
) (
  input  logic                                clk,
  input  logic [N_STACK-1:0]                  we,
  input  logic [N_STACK-1:0][SAW-1:0]         waddr,
  input  logic [N_STACK-1:0][N_ROWS-1:0]      sel1,
  input  logic [N_STACK-1:0][1:0][1:0]        sel2,
  input  logic [N_STACK-1:0][HALF_W-1:0]      wdata,
  input  logic [N_COLS-1:0]                   re,
  input  logic [N_COLS-1:0][RAW-1:0]          raddr,
  output logic [N_COLS-1:0][BYTE_W-1:0]       rdata
);

  logic [N_STACK-1:0][N_COLS-1:0]              bank_re;
  logic [N_STACK-1:0][N_COLS-1:0][BYTE_W-1:0]  bank_rdata;
  logic [N_COLS-1:0][BAW-1:0]                  bank_raddr;
  logic [N_COLS-1:0][STW-1:0]                  stack_q;

  always_comb begin
    for (int c = 0; c < N_COLS; c++) begin
      bank_raddr[c] = raddr[c][BAW-1:0];
      for (int s = 0; s < N_STACK; s++)
        bank_re[s][c] = re[c] && (int'(raddr[c][RAW-1:BAW]) == s);
    end
  end

  for (genvar s = 0; s < N_STACK; s++) begin : g_stack
    bank_b #(.SUB_DEPTH(SUB_DEPTH)) u_bank (
      .clk   (clk),
      .we    (we[s]),
      .waddr (waddr[s]),
      .sel1  (sel1[s]),
      .sel2  (sel2[s]),
      .wdata (wdata[s]),
      .re    (bank_re[s]),
      .raddr (bank_raddr),
      .rdata (bank_rdata[s])
    );
  end

  // The bank that drove each cascaded column on its last read.
  always_ff @(posedge clk) begin
    for (int c = 0; c < N_COLS; c++)
      if (re[c]) stack_q[c] <= raddr[c][RAW-1:BAW];
  end

  always_comb begin
    for (int c = 0; c < N_COLS; c++) rdata[c] = bank_rdata[stack_q[c]][c];
  end

endmodule
