// Self-checking testbench for bank_b at its default size (4x4 sub-banks of
// 16 bytes).
// First it replays four SEL2 write sequences (00-01-10-11, 00-01, 00-10,
// 00-11, one clock each, same address) and checks the values left in the
// four columns, as worked out from the SEL2 column table. Then random writes with
// random SEL1/SEL2 and random reads on all four columns at once are checked
// against a reference model that keeps every byte of the 4x4x16 array.
// Reads are checked one clock after re, as the bank's latency.
module tb_bank_b;
  import vsp_mem_pkg::*;

  logic clk = 0;
  logic we = 0;
  logic [3:0] waddr = '0;
  logic [3:0] sel1 = '0;
  logic [1:0][1:0] sel2 = '0;
  logic [15:0] wdata = '0;
  logic [3:0] re = '0;
  logic [3:0][5:0] raddr = '0;
  logic [3:0][7:0] rdata;
  logic [7:0] model [4][4][16];
  int checks = 0, failures = 0;

  bank_b dut (.*);

  always #5 clk = ~clk;

  // Column mask of a SEL2 code, bit 0 = column 1.
  function automatic logic [3:0] cols_of(input logic [1:0] s);
    case (s)
      2'b00: cols_of = 4'b1111;
      2'b01: cols_of = 4'b0011;
      2'b10: cols_of = 4'b0101;
      2'b11: cols_of = 4'b0001;
    endcase
  endfunction

  task automatic do_write(input logic [3:0] a, input logic [3:0] s1,
                          input logic [1:0][1:0] s2, input logic [15:0] d);
    @(negedge clk);
    we = 1; waddr = a; sel1 = s1; sel2 = s2; wdata = d;
    for (int r = 0; r < 4; r++)
      if (s1[r])
        for (int c = 0; c < 4; c++)
          if (cols_of(s2[r/2])[c]) model[r][c][a] = (r % 2 == 0) ? d[7:0] : d[15:8];
    @(negedge clk);
    we = 0;
  endtask

  // Read all four columns at once and compare.
  task automatic read_all(input logic [3:0][5:0] a, input string what);
    @(negedge clk);
    re = 4'hf; raddr = a;
    @(negedge clk);
    re = 0;
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (rdata[c] !== model[a[c][5:4]][c][a[c][3:0]]) begin
        failures++;
        $display("FAIL %s col %0d addr %h: got %h expected %h", what, c + 1, a[c],
                 rdata[c], model[a[c][5:4]][c][a[c][3:0]]);
      end
    end
  endtask

  task automatic expect_cols(input logic [1:0] row, input logic [3:0] a,
                             input logic [7:0] e1, e2, e3, e4, input string what);
    logic [7:0] e [4];
    e = '{e1, e2, e3, e4};
    read_all({{row, a}, {row, a}, {row, a}, {row, a}}, what);
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (rdata[c] !== e[c]) begin
        failures++;
        $display("FAIL %s column %0d: got %h expected %h", what, c + 1, rdata[c], e[c]);
      end
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
    // Initialise the whole array: SEL1 all rows, SEL2 all columns.
    for (int a = 0; a < 16; a++) do_write(4'(a), 4'hf, '0, 16'($urandom));

    // Column-selection table, row 1 (low byte, sel2[0]) at address 3:
    // data1..data4 = 11, 22, 33, 44 written on successive clocks.
    do_write(4'd3, 4'b0001, {2'b00, 2'b00}, 16'h0011);
    do_write(4'd3, 4'b0001, {2'b00, 2'b01}, 16'h0022);
    do_write(4'd3, 4'b0001, {2'b00, 2'b10}, 16'h0033);
    do_write(4'd3, 4'b0001, {2'b00, 2'b11}, 16'h0044);
    // SEL2 00 puts 11 everywhere, 01 puts 22 in columns 1-2, 10 puts 33 in
    // columns 1 and 3, 11 puts 44 in column 1.
    expect_cols(2'd0, 4'd3, 8'h44, 8'h22, 8'h33, 8'h11, "SEL2 00-01-10-11");
    // 00 -> 01 on row 4 (high byte, sel2[1])
    do_write(4'd9, 4'b1000, {2'b00, 2'b00}, 16'h5100);
    do_write(4'd9, 4'b1000, {2'b01, 2'b00}, 16'h5200);
    expect_cols(2'd3, 4'd9, 8'h52, 8'h52, 8'h51, 8'h51, "SEL2 00-01");
    // 00 -> 10 on row 3 (low byte, sel2[1])
    do_write(4'd0, 4'b0100, {2'b00, 2'b00}, 16'h0061);
    do_write(4'd0, 4'b0100, {2'b10, 2'b00}, 16'h0062);
    expect_cols(2'd2, 4'd0, 8'h62, 8'h61, 8'h62, 8'h61, "SEL2 00-10");
    // 00 -> 11 on row 2 (high byte, sel2[0])
    do_write(4'd15, 4'b0010, {2'b00, 2'b00}, 16'h7100);
    do_write(4'd15, 4'b0010, {2'b00, 2'b11}, 16'h7200);
    expect_cols(2'd1, 4'd15, 8'h72, 8'h71, 8'h71, 8'h71, "SEL2 00-11");

    // Random traffic against the model.
    repeat (400) begin
      do_write(4'($urandom), 4'($urandom), 4'($urandom), 16'($urandom));
      read_all(24'($urandom), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
