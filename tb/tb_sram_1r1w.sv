// Self-checking testbench for sram_1r1w at its default size (16 x 8).
// Checks write then read, the one-clock read latency, output hold while re
// is low, that we low leaves the contents alone, and that a read of the
// address being written returns the old word. Expected values come from a
// plain array kept by the testbench.
module tb_sram_1r1w;
  localparam int DEPTH = 16;
  localparam int WIDTH = 8;

  logic clk = 0;
  logic we = 0, re = 0;
  logic [3:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  sram_1r1w dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [WIDTH-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 4'(a); wdata = 8'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    // clocks with we low must not write
    repeat (20) begin
      @(negedge clk); waddr = 4'($urandom); wdata = 8'($urandom);
    end
    // read every word: data appears after exactly one edge
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); re = 1; raddr = 4'(a);
      @(negedge clk); re = 0;
      check(rdata, model[a], $sformatf("read addr %0d", a));
      // hold while re is low
      raddr = 4'(a + 1);
      @(negedge clk);
      check(rdata, model[a], "hold with re low");
    end
    // read during write of the same address returns the old word
    @(negedge clk);
    we = 1; waddr = 4'd7; wdata = ~model[7];
    re = 1; raddr = 4'd7;
    @(negedge clk);
    we = 0; re = 0;
    check(rdata, model[7], "read during write gives old word");
    model[7] = ~model[7];
    re = 1;
    @(negedge clk); re = 0;
    check(rdata, model[7], "new word after write");
    // random mixed traffic
    repeat (300) begin
      logic [3:0] ra;
      @(negedge clk);
      we = 1'($urandom); waddr = 4'($urandom); wdata = 8'($urandom);
      re = 1; ra = 4'($urandom); raddr = ra;
      begin
        logic [WIDTH-1:0] exp;
        exp = model[ra];
        if (we) model[waddr] = wdata;
        @(negedge clk);
        re = 0; we = 0;
        check(rdata, exp, "random traffic");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
