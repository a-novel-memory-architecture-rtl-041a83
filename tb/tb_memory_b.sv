// Self-checking testbench for memory_b at its default size (4 groups x 4
// stacked bank B's, 4 KB).
// The bus views and reachability masks are driven as the bus switches would
// drive them under a random partition. Each clock every one of the sixteen
// bank B's gets a random write (source bus half or function unit, SEL1,
// SEL2, address); writes from an unreachable source must be dropped and
// flagged. Then all sixteen read columns are read at random addresses and
// checked one clock later against a byte model of the whole memory.
module tb_memory_b;
  import vsp_mem_pkg::*;

  logic clk = 0;
  logic [3:0][3:0][31:0] bus_view = '0;
  logic [3:0][3:0] vis = '0;
  logic [3:0][15:0] fu_result = '0;
  bwr_t [3:0][3:0] bwr = '0;
  logic [3:0][3:0] rd_en = '0;
  logic [3:0][3:0][7:0] rd_addr = '0;
  logic [3:0][3:0][7:0] rd_data;
  logic [3:0][3:0] wr_illegal;
  logic [7:0] model [4][4][4][4][16];   // group, stack, row, column, word
  int checks = 0, failures = 0;
  int n_illegal = 0, n_fu = 0, n_bus = 0;

  memory_b dut (.*);

  always #5 clk = ~clk;

  function automatic logic [3:0] cols_of(input logic [1:0] s);
    case (s)
      2'b00: cols_of = 4'b1111;
      2'b01: cols_of = 4'b0011;
      2'b10: cols_of = 4'b0101;
      2'b11: cols_of = 4'b0001;
    endcase
  endfunction

  function automatic int seg(input int p, input int g);
    case (p)
      0:       seg = 0;
      1:       seg = g / 2;
      default: seg = g;
    endcase
  endfunction

  // Set up one random clock of writes and update the model.
  task automatic random_writes(input int p, input logic all_legal, input logic update);
    logic [3:0][31:0] bus;
    for (int j = 0; j < 4; j++) begin
      bus[j] = $urandom; fu_result[j] = 16'($urandom);
    end
    for (int g = 0; g < 4; g++)
      for (int j = 0; j < 4; j++) begin
        vis[g][j] = seg(p, g) == seg(p, j);
        bus_view[g][j] = vis[g][j] ? bus[j] : '0;
      end
    for (int g = 0; g < 4; g++)
      for (int s = 0; s < 4; s++) begin
        logic [15:0] d;
        bwr[g][s] = bwr_t'($bits(bwr_t)'($urandom));
        bwr[g][s].we = all_legal ? 1'b1 : 1'($urandom);
        if (all_legal) bwr[g][s].idx = 2'(g);
        if (bwr[g][s].src == SRC_FU) d = fu_result[bwr[g][s].idx];
        else d = bwr[g][s].half ? bus[bwr[g][s].idx][31:16] : bus[bwr[g][s].idx][15:0];
        if (bwr[g][s].we && !vis[g][bwr[g][s].idx]) n_illegal++;
        else if (bwr[g][s].we && update) begin
          if (bwr[g][s].src == SRC_FU) n_fu++; else n_bus++;
          for (int r = 0; r < 4; r++)
            if (bwr[g][s].sel1[r])
              for (int c = 0; c < 4; c++)
                if (cols_of(bwr[g][s].sel2[r/2])[c])
                  model[g][s][r][c][bwr[g][s].waddr] = (r % 2 == 0) ? d[7:0] : d[15:8];
        end
      end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Fill: each group writes its own bus into all rows and columns.
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      random_writes(2, 1'b1, 1'b0);
      for (int g = 0; g < 4; g++)
        for (int s = 0; s < 4; s++) begin
          bwr[g][s].waddr = 4'(a); bwr[g][s].sel1 = '1; bwr[g][s].sel2 = '0;
        end
      // redo the model update with the forced fields
      for (int g = 0; g < 4; g++)
        for (int s = 0; s < 4; s++) begin
          logic [15:0] d;
          if (bwr[g][s].src == SRC_FU) d = fu_result[g];
          else d = bwr[g][s].half ? bus_view[g][g][31:16] : bus_view[g][g][15:0];
          for (int r = 0; r < 4; r++)
            for (int c = 0; c < 4; c++)
              model[g][s][r][c][a] = (r % 2 == 0) ? d[7:0] : d[15:8];
        end
    end
    @(negedge clk);
    for (int g = 0; g < 4; g++) for (int s = 0; s < 4; s++) bwr[g][s].we = 0;

    repeat (400) begin
      logic [3:0][3:0][7:0] ra;
      logic [3:0][3:0] exp_illegal;
      @(negedge clk);
      random_writes($urandom_range(0, 2), 1'b0, 1'b1);
      for (int g = 0; g < 4; g++)
        for (int s = 0; s < 4; s++)
          exp_illegal[g][s] = bwr[g][s].we && !vis[g][bwr[g][s].idx];
      #1;
      checks++;
      if (wr_illegal !== exp_illegal) begin
        failures++; $display("FAIL wr_illegal got %h expected %h", wr_illegal, exp_illegal);
      end
      @(negedge clk);
      for (int g = 0; g < 4; g++) for (int s = 0; s < 4; s++) bwr[g][s].we = 0;
      for (int g = 0; g < 4; g++) for (int c = 0; c < 4; c++) ra[g][c] = 8'($urandom);
      rd_en = '1; rd_addr = ra;
      @(negedge clk);
      rd_en = '0;
      for (int g = 0; g < 4; g++)
        for (int c = 0; c < 4; c++) begin
          logic [7:0] e;
          e = model[g][ra[g][c][7:6]][ra[g][c][5:4]][c][ra[g][c][3:0]];
          checks++;
          if (rd_data[g][c] !== e) begin
            failures++;
            $display("FAIL group %0d column %0d addr %h: got %h expected %h",
                     g, c, ra[g][c], rd_data[g][c], e);
          end
        end
    end
    checks++;
    if (n_illegal == 0 || n_fu == 0 || n_bus == 0) begin
      failures++; $display("FAIL a write kind never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
