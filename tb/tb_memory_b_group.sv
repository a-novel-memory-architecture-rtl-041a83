// Self-checking testbench for memory_b_group at its default size (four
// stacked bank B's, 16-byte sub-banks).
// Each clock it writes up to four stacked banks at once with random SEL1,
// SEL2 and data, then reads the four cascaded read columns at independent
// random addresses {stack, row, word}. A reference model of all
// 4 x 4 x 4 x 16 bytes gives the expected bytes, checked one clock after re.
// It also checks that a column holds its byte while re is low.
module tb_memory_b_group;
  import vsp_mem_pkg::*;

  logic clk = 0;
  logic [3:0] we = '0;
  logic [3:0][3:0] waddr = '0;
  logic [3:0][3:0] sel1 = '0;
  logic [3:0][1:0][1:0] sel2 = '0;
  logic [3:0][15:0] wdata = '0;
  logic [3:0] re = '0;
  logic [3:0][7:0] raddr = '0;
  logic [3:0][7:0] rdata;
  logic [7:0] model [4][4][4][16];   // stack, row, column, word
  int checks = 0, failures = 0;
  int multi_writes = 0;

  memory_b_group dut (.*);

  always #5 clk = ~clk;

  function automatic logic [3:0] cols_of(input logic [1:0] s);
    case (s)
      2'b00: cols_of = 4'b1111;
      2'b01: cols_of = 4'b0011;
      2'b10: cols_of = 4'b0101;
      2'b11: cols_of = 4'b0001;
    endcase
  endfunction

  task automatic apply_writes();
    for (int s = 0; s < 4; s++)
      if (we[s])
        for (int r = 0; r < 4; r++)
          if (sel1[s][r])
            for (int c = 0; c < 4; c++)
              if (cols_of(sel2[s][r/2])[c])
                model[s][r][c][waddr[s]] = (r % 2 == 0) ? wdata[s][7:0] : wdata[s][15:8];
  endtask

  task automatic check_col(input int c, input logic [7:0] a, input string what);
    logic [7:0] e;
    e = model[a[7:6]][a[5:4]][c][a[3:0]];
    checks++;
    if (rdata[c] !== e) begin
      failures++;
      $display("FAIL %s column %0d addr %h: got %h expected %h", what, c, a, rdata[c], e);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill: every stack, every row, every column
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      we = 4'hf; sel1 = '1; sel2 = '0;
      for (int s = 0; s < 4; s++) begin
        waddr[s] = 4'(a); wdata[s] = 16'($urandom);
      end
      apply_writes();
    end
    @(negedge clk); we = 0;

    repeat (500) begin
      logic [3:0][7:0] ra;
      @(negedge clk);
      we = 4'($urandom);
      if ($countones(we) > 1) multi_writes++;
      for (int s = 0; s < 4; s++) begin
        waddr[s] = 4'($urandom); sel1[s] = 4'($urandom);
        sel2[s] = 4'($urandom); wdata[s] = 16'($urandom);
      end
      apply_writes();
      @(negedge clk);
      we = 0;
      re = 4'hf; ra = 32'($urandom); raddr = ra;
      @(negedge clk);
      re = 0; raddr = 32'($urandom);
      for (int c = 0; c < 4; c++) check_col(c, ra[c], "read");
      @(negedge clk);
      for (int c = 0; c < 4; c++) check_col(c, ra[c], "hold");
    end
    checks++;
    if (multi_writes == 0) begin
      failures++;
      $display("FAIL no clock with several stacked writes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
