// Self-checking testbench for memory_a at its default size (sixteen byte
// banks of 192 bytes).
// Fills Memory A through the 32-bit DMA port with random group masks,
// including broadcasts to all groups, then reads the four groups at
// independent addresses and checks each 32-bit word one clock after the
// read, against a byte model of every bank. Also checks the pixel
// interleave: byte k of a DMA word is read back as byte k of the group word.
module tb_memory_a;
  import vsp_mem_pkg::*;
  localparam int A_DEPTH = 192;

  logic clk = 0;
  logic dma_we = 0;
  logic [7:0] dma_waddr = '0;
  logic [3:0] dma_gmask = '0;
  logic [31:0] dma_wdata = '0;
  logic [3:0] a_re = '0;
  logic [3:0][7:0] a_raddr = '0;
  logic [3:0][31:0] a_rdata;
  logic [31:0] model [4][A_DEPTH];
  int checks = 0, failures = 0;

  memory_a dut (.*);

  always #5 clk = ~clk;

  task automatic dma(input int a, input logic [3:0] m, input logic [31:0] d);
    @(negedge clk);
    dma_we = 1; dma_waddr = 8'(a); dma_gmask = m; dma_wdata = d;
    for (int g = 0; g < 4; g++) if (m[g]) model[g][a] = d;
    @(negedge clk);
    dma_we = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < A_DEPTH; a++) dma(a, 4'hf, $urandom);
    repeat (600) dma($urandom_range(0, A_DEPTH - 1), 4'($urandom), $urandom);
    // pixel interleave: pixels 1..4 of a frame row at address 5 of group 2
    dma(5, 4'b0100, {8'd4, 8'd3, 8'd2, 8'd1});
    for (int n = 0; n < 800; n++) begin
      logic [3:0][7:0] ra;
      @(negedge clk);
      for (int g = 0; g < 4; g++) ra[g] = 8'($urandom_range(0, A_DEPTH - 1));
      if (n == 0) ra[2] = 8'd5;
      a_re = 4'hf; a_raddr = ra;
      @(negedge clk);
      a_re = 0;
      for (int g = 0; g < 4; g++) begin
        checks++;
        if (a_rdata[g] !== model[g][ra[g]]) begin
          failures++;
          $display("FAIL group %0d addr %0d: got %h expected %h", g, ra[g], a_rdata[g], model[g][ra[g]]);
        end
      end
      if (n == 0) begin
        checks++;
        if (a_rdata[2][7:0] !== 8'd1 || a_rdata[2][31:24] !== 8'd4) begin
          failures++; $display("FAIL pixel interleave");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
