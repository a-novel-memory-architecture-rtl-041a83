// End-to-end testbench for vsp_memory at its default parameters.
//
// It plays the processor's control and four function units (FUs) and runs
// the memory's uses one after another:
//  1. block matching: a 7x8 frame goes in by DMA to Memory A, then row by
//     row over buses 0-1 into every read column of Memory B (A read in one
//     clock, B write in the next). A 4x4 template goes straight from the DMA
//     input into Memory B. Each clock the four FUs read a frame pixel and a
//     template pixel for two candidate positions (all 16 read ports) and
//     form absolute differences. The sums of absolute differences of 16
//     candidates are checked against ones computed from the frame.
//  2. write-back: the four FU results go into all 16 columns in one clock
//     (one 16-read/4-write memory) and are read back.
//  3. butterfly: x1..x4 are copied into every column and the FUs read the
//     pairs (x1,x4) (x2,x3) (x3,x2) (x4,x1) in one clock.
//  4. two 8-read/2-write and four 4-read/1-write memories: different data
//     per bus segment, checked to stay in their own groups.
//  5. sixteen one-read memories: SEL2 sequences 00,01,10,11 leave 16
//     different bytes in the 16 columns.
// Every read is checked one clock after rd_en; the Memory A to Memory B to
// FU path is checked to take three clocks. Each mechanism is counted and
// one that never happened counts as a failure.
module tb_vsp_memory;
  import vsp_mem_pkg::*;

  logic clk = 0;
  logic dma_we = 0;
  logic [7:0] dma_waddr = '0;
  logic [3:0] dma_gmask = '0;
  logic [31:0] dma_wdata = '0;
  logic [3:0] a_re = '0;
  logic [3:0][7:0] a_raddr = '0;
  logic [3:0] bus_from_dma = '0;
  part_e part = PART_1;
  bwr_t [3:0][3:0] bwr = '0;
  logic [3:0][15:0] fu_result = '0;
  logic [3:0][3:0] rd_en = '0;
  logic [3:0][3:0][7:0] rd_addr = '0;
  logic [3:0][3:0][7:0] rd_data;
  logic [3:0][3:0] wr_illegal;

  vsp_memory dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  // mechanism counters
  int n_a_to_b = 0, n_dma_to_b = 0, n_fu_to_b = 0, n_absdiff = 0, n_butterfly = 0;
  int n_part [3] = '{0, 0, 0};
  int n_sel2 [4] = '{0, 0, 0, 0};
  int n_16_reads = 0, n_16_writes = 0, n_16_distinct = 0;

  string nm [13] = '{"A-to-B transfer", "DMA-to-B write", "FU write-back",
                     "abs-difference", "butterfly", "PART_1", "PART_2", "PART_4",
                     "SEL2=00", "SEL2=01", "SEL2=10", "SEL2=11", "16-port read"};

  byte unsigned frame [7][8];
  byte unsigned templ [4][4];

  task automatic check8(input logic [7:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic idle();
    dma_we = 0; a_re = '0; bus_from_dma = '0; rd_en = '0;
    for (int g = 0; g < 4; g++) for (int s = 0; s < 4; s++) bwr[g][s].we = 1'b0;
  endtask

  // Count what the bank writes set up for this clock.
  task automatic count_writes();
    int n = 0;
    for (int g = 0; g < 4; g++)
      for (int s = 0; s < 4; s++)
        if (bwr[g][s].we) begin
          n++;
          n_part[int'(part)]++;
          if (bwr[g][s].sel1[1:0] != 0) n_sel2[bwr[g][s].sel2[0]]++;
          if (bwr[g][s].sel1[3:2] != 0) n_sel2[bwr[g][s].sel2[1]]++;
          if (bwr[g][s].src == SRC_FU) n_fu_to_b++;
          else if (bus_from_dma[bwr[g][s].idx]) n_dma_to_b++;
          else n_a_to_b++;
        end
    if (n == 16) n_16_writes++;
  endtask

  task automatic step();
    count_writes();
    if (rd_en == '1) n_16_reads++;
    @(negedge clk);
    idle();
  endtask

  task automatic bw(input int g, s, input bsrc_e src, input int idx, half, waddr,
                    input logic [3:0] sel1, input logic [1:0] sel2_lo, sel2_hi);
    bwr[g][s].we = 1'b1; bwr[g][s].src = src; bwr[g][s].idx = 2'(idx);
    bwr[g][s].half = 1'(half); bwr[g][s].waddr = 4'(waddr); bwr[g][s].sel1 = sel1;
    bwr[g][s].sel2[0] = sel2_lo; bwr[g][s].sel2[1] = sel2_hi;
  endtask

  // Column address of frame pixel x of the row stored at word w:
  // pixels 2k and 2k+1 sit in rows 1-2 of stack level k.
  function automatic logic [7:0] fa(input int x, input int w);
    return {2'(x / 2), 2'(x % 2), 4'(w)};
  endfunction
  // Template pixel (i, j): rows 3-4 of stack level j/2, word i.
  function automatic logic [7:0] ta(input int i, input int j);
    return {2'(j / 2), 2'(2 + j % 2), 4'(i)};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (frame[r, x]) frame[r][x] = 8'($urandom);
    foreach (templ[i, j]) templ[i][j] = 8'($urandom);
    @(negedge clk);
    idle();

    // ---- 1. block matching ------------------------------------------------
    part = PART_1;
    // frame into Memory A of every group: row r at words 2r and 2r+1
    for (int r = 0; r < 7; r++)
      for (int w = 0; w < 2; w++) begin
        dma_we = 1; dma_gmask = 4'hf; dma_waddr = 8'(2 * r + w);
        dma_wdata = {frame[r][4*w+3], frame[r][4*w+2], frame[r][4*w+1], frame[r][4*w]};
        step();
      end
    // template rows straight from the DMA input into rows 3-4 of all columns
    for (int i = 0; i < 4; i++) begin
      bus_from_dma[0] = 1'b1;
      dma_wdata = {templ[i][3], templ[i][2], templ[i][1], templ[i][0]};
      for (int g = 0; g < 4; g++) begin
        bw(g, 0, SRC_BUS, 0, 0, i, 4'b1100, 2'b00, 2'b00);
        bw(g, 1, SRC_BUS, 0, 1, i, 4'b1100, 2'b00, 2'b00);
      end
      step();
    end
    // frame rows from Memory A to Memory B, pipelined: A read of row r and
    // the B write of row r-1 in the same clock
    for (int r = 0; r <= 7; r++) begin
      if (r < 7) begin
        a_re[0] = 1'b1; a_raddr[0] = 8'(2 * r);
        a_re[1] = 1'b1; a_raddr[1] = 8'(2 * r + 1);
      end
      if (r > 0)
        for (int g = 0; g < 4; g++)
          for (int s = 0; s < 4; s++)
            bw(g, s, SRC_BUS, s / 2, s % 2, r - 1, 4'b0011, 2'b00, 2'b00);
      step();
    end
    // 16 candidates: rows 0..3, columns 0..3, two per pass of 4 clocks
    for (int r0 = 0; r0 < 4; r0++)
      for (int c0 = 0; c0 < 4; c0 += 2) begin
        int sad_hw [2], sad_ref [2];
        sad_hw = '{0, 0}; sad_ref = '{0, 0};
        for (int i = 0; i < 4; i++) begin
          for (int j = 0; j < 4; j++) begin
            rd_en[j] = 4'hf;
            rd_addr[j][0] = fa(c0 + j, r0 + i);
            rd_addr[j][1] = ta(i, j);
            rd_addr[j][2] = fa(c0 + 1 + j, r0 + i);
            rd_addr[j][3] = ta(i, j);
          end
          step();
          for (int j = 0; j < 4; j++) begin
            int d0, d1;
            check8(rd_data[j][0], frame[r0 + i][c0 + j], "frame pixel");
            check8(rd_data[j][1], templ[i][j], "template pixel");
            check8(rd_data[j][2], frame[r0 + i][c0 + 1 + j], "frame pixel 2");
            check8(rd_data[j][3], templ[i][j], "template pixel 2");
            d0 = int'(rd_data[j][0]) - int'(rd_data[j][1]);
            d1 = int'(rd_data[j][2]) - int'(rd_data[j][3]);
            sad_hw[0] += (d0 < 0) ? -d0 : d0;
            sad_hw[1] += (d1 < 0) ? -d1 : d1;
            n_absdiff += 2;
            d0 = int'(frame[r0 + i][c0 + j]) - int'(templ[i][j]);
            d1 = int'(frame[r0 + i][c0 + 1 + j]) - int'(templ[i][j]);
            sad_ref[0] += (d0 < 0) ? -d0 : d0;
            sad_ref[1] += (d1 < 0) ? -d1 : d1;
          end
        end
        for (int k = 0; k < 2; k++) begin
          checks++;
          if (sad_hw[k] != sad_ref[k]) begin
            failures++;
            $display("FAIL SAD at (%0d,%0d): got %0d expected %0d", r0, c0 + k, sad_hw[k], sad_ref[k]);
          end
        end
      end

    // latency: Memory A read -> bus -> Memory B write -> FU read data
    begin
      int t0;
      dma_we = 1; dma_gmask = 4'b0001; dma_waddr = 8'd150; dma_wdata = 32'hA5C3_5A3C;
      step();
      a_re[0] = 1'b1; a_raddr[0] = 8'd150;
      t0 = cycle;
      step();
      bw(0, 3, SRC_BUS, 0, 1, 12, 4'b0011, 2'b00, 2'b00);
      step();
      rd_en[0][2] = 1'b1; rd_addr[0][2] = {2'd3, 2'd1, 4'd12};
      step();
      check8(rd_data[0][2], 8'hA5, "A-to-B path data");
      checks++;
      if (cycle - t0 != 3) begin
        failures++; $display("FAIL A-to-FU path took %0d clocks, expected 3", cycle - t0);
      end
    end

    // ---- 2. FU write-back, four write ports into all sixteen columns ----
    for (int j = 0; j < 4; j++) fu_result[j] = 16'($urandom);
    for (int g = 0; g < 4; g++)
      for (int j = 0; j < 4; j++) bw(g, j, SRC_FU, j, 0, 15, 4'b1100, 2'b00, 2'b00);
    step();
    for (int j = 0; j < 4; j++) begin
      for (int g = 0; g < 4; g++)
        for (int c = 0; c < 4; c++) begin
          rd_en[g][c] = 1'b1; rd_addr[g][c] = {2'(j), 2'(2 + c % 2), 4'd15};
        end
      step();
      for (int g = 0; g < 4; g++)
        for (int c = 0; c < 4; c++)
          check8(rd_data[g][c], (c % 2 == 0) ? fu_result[j][7:0] : fu_result[j][15:8],
                 "FU result copy");
    end

    // ---- 3. butterfly --------------------------------------------------
    begin
      logic [7:0] x [4];
      for (int k = 0; k < 4; k++) x[k] = 8'($urandom);
      bus_from_dma[2] = 1'b1;
      dma_wdata = {x[3], x[2], x[1], x[0]};
      for (int g = 0; g < 4; g++) begin
        bw(g, 0, SRC_BUS, 2, 0, 14, 4'b0011, 2'b00, 2'b00);
        bw(g, 1, SRC_BUS, 2, 1, 14, 4'b0011, 2'b00, 2'b00);
      end
      step();
      // FU j combines x(j) with x(3-j)
      for (int j = 0; j < 4; j++) begin
        rd_en[j][0] = 1'b1; rd_addr[j][0] = fa(j, 14);
        rd_en[j][1] = 1'b1; rd_addr[j][1] = fa(3 - j, 14);
      end
      step();
      for (int j = 0; j < 4; j++) begin
        check8(rd_data[j][0], x[j], "butterfly left");
        check8(rd_data[j][1], x[3 - j], "butterfly right");
        n_butterfly++;
      end
    end

    // ---- 4. two 8R2W and four 4R1W memories ---------------------------
    begin
      logic [31:0] w [4];
      for (int g = 0; g < 4; g++) begin
        w[g] = $urandom;
        dma_we = 1; dma_gmask = 4'(1 << g); dma_waddr = 8'd100; dma_wdata = w[g];
        step();
      end
      // PART_2: groups 0-1 take bus 0, groups 2-3 take bus 2
      part = PART_2;
      a_re = 4'b0101; a_raddr[0] = 8'd100; a_raddr[2] = 8'd100;
      step();
      part = PART_2;
      for (int g = 0; g < 4; g++) begin
        bw(g, 2, SRC_BUS, (g / 2) * 2, 0, 13, 4'b0011, 2'b00, 2'b00);
        bw(g, 3, SRC_BUS, (g / 2) * 2, 1, 13, 4'b0011, 2'b00, 2'b00);
      end
      step();
      for (int k = 0; k < 4; k++) begin
        for (int g = 0; g < 4; g++)
          for (int c = 0; c < 4; c++) begin
            rd_en[g][c] = 1'b1; rd_addr[g][c] = fa(4 + k, 13);
          end
        step();
        for (int g = 0; g < 4; g++)
          for (int c = 0; c < 4; c++)
            check8(rd_data[g][c], w[(g / 2) * 2][8*k +: 8], "8R2W memory");
      end
      // PART_4: each group takes its own bus
      part = PART_4;
      a_re = 4'hf; for (int g = 0; g < 4; g++) a_raddr[g] = 8'd100;
      step();
      part = PART_4;
      for (int g = 0; g < 4; g++) begin
        bw(g, 2, SRC_BUS, g, 0, 11, 4'b0011, 2'b00, 2'b00);
        bw(g, 3, SRC_BUS, g, 1, 11, 4'b0011, 2'b00, 2'b00);
      end
      step();
      for (int k = 0; k < 4; k++) begin
        for (int g = 0; g < 4; g++)
          for (int c = 0; c < 4; c++) begin
            rd_en[g][c] = 1'b1; rd_addr[g][c] = fa(4 + k, 11);
          end
        step();
        for (int g = 0; g < 4; g++)
          for (int c = 0; c < 4; c++)
            check8(rd_data[g][c], w[g][8*k +: 8], "4R1W memory");
      end
    end

    // ---- 5. sixteen one-read memories by SEL2 sequencing ----------------
    begin
      logic [15:0] f [4][4];   // clock k, FU g
      logic [7:0] seen [16];
      logic ok;
      part = PART_4;
      for (int k = 0; k < 4; k++) begin
        for (int g = 0; g < 4; g++) begin
          // distinct low bytes: the high nibble names the clock and FU
          f[k][g] = {8'($urandom), 4'(4 * g + k), 4'($urandom)};
          fu_result[g] = f[k][g];
          bw(g, 0, SRC_FU, g, 0, 9, 4'b0001, 2'(k), 2'b00);
        end
        step();
      end
      for (int g = 0; g < 4; g++)
        for (int c = 0; c < 4; c++) begin
          rd_en[g][c] = 1'b1; rd_addr[g][c] = {2'd0, 2'd0, 4'd9};
        end
      step();
      // SEL2 00, 01, 10, 11 leave: column 1 <- clock 3, column 2 <- clock 1,
      // column 3 <- clock 2, column 4 <- clock 0
      for (int g = 0; g < 4; g++) begin
        check8(rd_data[g][0], f[3][g][7:0], "1R column 1");
        check8(rd_data[g][1], f[1][g][7:0], "1R column 2");
        check8(rd_data[g][2], f[2][g][7:0], "1R column 3");
        check8(rd_data[g][3], f[0][g][7:0], "1R column 4");
        for (int c = 0; c < 4; c++) seen[4 * g + c] = rd_data[g][c];
      end
      ok = 1'b1;
      for (int a = 0; a < 16; a++)
        for (int b = a + 1; b < 16; b++)
          if (seen[a] == seen[b]) ok = 1'b0;
      if (ok) n_16_distinct++;
    end

    // ---- mechanism coverage ---------------------------------------------
    begin
      int cov [13];
      cov = '{n_a_to_b, n_dma_to_b, n_fu_to_b, n_absdiff, n_butterfly,
              n_part[0], n_part[1], n_part[2],
              n_sel2[0], n_sel2[1], n_sel2[2], n_sel2[3], n_16_reads};
      for (int m = 0; m < 13; m++) begin
        checks++;
        $display("mechanism %-16s happened %0d times", nm[m], cov[m]);
        if (cov[m] == 0) begin
          failures++; $display("FAIL mechanism %s never happened", nm[m]);
        end
      end
      checks += 2;
      $display("clocks with 16 bank writes: %0d, 16 distinct columns: %0d", n_16_writes, n_16_distinct);
      if (n_16_writes == 0) begin failures++; $display("FAIL no clock with 16 bank writes"); end
      if (n_16_distinct == 0) begin failures++; $display("FAIL 16 columns never distinct"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
