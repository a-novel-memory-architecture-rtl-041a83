// One-read-one-write memory bank.
//
// The storage element of both memory levels: the bank-A memories and the
// 16-byte sub-banks of every bank B. Reading and writing have separate
// circuitry, so one write and one read happen in the same clock at
// independent addresses, as in a two-port static RAM.
//
// Timing: a write takes effect at the rising clock edge where we is high.
// A read is registered: with re high at an edge, rdata shows the word at
// raddr after that edge and holds it until the next read. A read of the
// address written at the same edge returns the old word. Nothing is reset;
// words read before they are written are undefined.
//
// Defaults: 16 words of 8 bits, the published sub-bank size.
module sram_1r1w #(
  parameter int DEPTH = 16,
  parameter int WIDTH = 8,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
