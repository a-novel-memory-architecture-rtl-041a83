// Workload testbench: full-search block matching with vsp_memory at its
// default parameters.
//
// Displacement D = 16 and a 16x16 macroblock give a 48x48 search area
// (2304 bytes). It is loaded by DMA into Memory A, search row y in group
// y mod 4 at word (y/4)*12 + w. While the search runs, the DMA input also
// prefetches the next 16x48 strip (768 bytes) into the rest of Memory A,
// which then holds exactly 3072 bytes.
//
// For each candidate row dy (0..32) and template row i (0..15):
//  * search row dy+i travels from Memory A over its bus into rows 1-2 of
//    stacks 0-1 of every group (12 words, one per clock);
//  * template row i comes straight from the DMA input into rows 3-4 of
//    stacks 0-1;
//  * the four FUs (modelled here) each work on two horizontal candidates at
//    once, dx = 8q + j and 8q + 4 + j, reading search and template bytes on
//    all 16 read ports, one pixel pair per candidate per clock.
// The FU model accumulates the 33x33 sums of absolute differences from the
// bytes the memory returns. They are compared with sums computed directly
// from the test data, and the best motion vector with the displacement at
// which the macroblock was planted. The last prefetched row is then sent
// through to Memory B and checked. The compute clocks per candidate row are
// checked against 5 passes x 16 pixels x 16 template rows.
module tb_block_matching;
  import vsp_mem_pkg::*;

  localparam int D   = 16;
  localparam int MB  = 16;
  localparam int SA  = 2 * D + MB;        // 48
  localparam int NC  = 2 * D + 1;         // 33 candidates per axis
  localparam int WPR = SA / 4;            // 12 words per search row
  localparam int MVX = 11, MVY = 23;      // planted motion vector

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

  byte unsigned area [SA + MB][SA];   // search area plus next strip
  byte unsigned mb [MB][MB];
  int sad_hw [NC][NC];
  int n_prefetch = 0, pf_next = 0, n_absdiff = 0, compute_clocks = 0;

  function automatic logic [7:0] a_word_addr(input int y, input int w);
    return 8'((y / 4) * WPR + w);
  endfunction

  // Column address of search pixel x (rows 1-2) and template pixel k
  // (rows 3-4): pixel 4w+n sits at word w, stack n/2, row n%2 (+2).
  function automatic logic [7:0] sa_addr(input int x);
    return {2'((x % 4) / 2), 2'(x % 2), 4'(x / 4)};
  endfunction
  function automatic logic [7:0] tp_addr(input int k);
    return {2'((k % 4) / 2), 2'(2 + k % 2), 4'(k / 4)};
  endfunction

  task automatic idle();
    dma_we = 0; a_re = '0; bus_from_dma = '0; rd_en = '0;
    for (int g = 0; g < 4; g++) for (int s = 0; s < 4; s++) bwr[g][s].we = 1'b0;
  endtask

  // Use an idle DMA clock to prefetch one word of the next strip.
  task automatic prefetch_if_free();
    if (bus_from_dma == '0 && !dma_we && pf_next < MB * WPR) begin
      int y, w;
      y = SA + pf_next / WPR; w = pf_next % WPR;
      dma_we = 1; dma_gmask = 4'(1 << (y % 4)); dma_waddr = a_word_addr(y, w);
      dma_wdata = {area[y][4*w+3], area[y][4*w+2], area[y][4*w+1], area[y][4*w]};
      pf_next++; n_prefetch++;
    end
  endtask

  task automatic step();
    prefetch_if_free();
    @(negedge clk);
    idle();
  endtask

  task automatic bw(input int g, s, input bsrc_e src, input int idx, half, waddr,
                    input logic [3:0] sel1);
    bwr[g][s].we = 1'b1; bwr[g][s].src = src; bwr[g][s].idx = 2'(idx);
    bwr[g][s].half = 1'(half); bwr[g][s].waddr = 4'(waddr); bwr[g][s].sel1 = sel1;
    bwr[g][s].sel2 = '0;
  endtask

  // Search row y from Memory A into every group, pipelined one clock.
  task automatic load_search_row(input int y);
    for (int w = 0; w <= WPR; w++) begin
      if (w < WPR) begin
        a_re[y % 4] = 1'b1; a_raddr[y % 4] = a_word_addr(y, w);
      end
      if (w > 0)
        for (int g = 0; g < 4; g++) begin
          bw(g, 0, SRC_BUS, y % 4, 0, w - 1, 4'b0011);
          bw(g, 1, SRC_BUS, y % 4, 1, w - 1, 4'b0011);
        end
      step();
    end
  endtask

  task automatic load_template_row(input int i);
    for (int w = 0; w < MB / 4; w++) begin
      bus_from_dma[0] = 1'b1;
      dma_wdata = {mb[i][4*w+3], mb[i][4*w+2], mb[i][4*w+1], mb[i][4*w]};
      for (int g = 0; g < 4; g++) begin
        bw(g, 0, SRC_BUS, 0, 0, w, 4'b1100);
        bw(g, 1, SRC_BUS, 0, 1, w, 4'b1100);
      end
      step();
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (area[y, x]) area[y][x] = 8'($urandom);
    // macroblock = search area at the planted vector plus small noise
    foreach (mb[i, k]) mb[i][k] = 8'(int'(area[MVY + i][MVX + k]) ^ ($urandom_range(0, 3)));
    foreach (sad_hw[a, b]) sad_hw[a][b] = 0;
    @(negedge clk);
    idle();

    // search area into Memory A
    for (int y = 0; y < SA; y++)
      for (int w = 0; w < WPR; w++) begin
        dma_we = 1; dma_gmask = 4'(1 << (y % 4)); dma_waddr = a_word_addr(y, w);
        dma_wdata = {area[y][4*w+3], area[y][4*w+2], area[y][4*w+1], area[y][4*w]};
        @(negedge clk);
        idle();
      end

    for (int dy = 0; dy < NC; dy++) begin
      int c_start;
      c_start = compute_clocks;
      for (int i = 0; i < MB; i++) begin
        load_search_row(dy + i);
        load_template_row(i);
        // FU j: candidates dx = 8q + j (columns 0,1) and 8q + 4 + j (2,3)
        for (int q = 0; q < 5; q++)
          for (int k = 0; k < MB; k++) begin
            for (int j = 0; j < 4; j++) begin
              rd_en[j] = 4'hf;
              rd_addr[j][0] = sa_addr((8 * q + j + k) % SA);
              rd_addr[j][1] = tp_addr(k);
              rd_addr[j][2] = sa_addr((8 * q + 4 + j + k) % SA);
              rd_addr[j][3] = tp_addr(k);
            end
            step();
            compute_clocks++;
            for (int j = 0; j < 4; j++)
              for (int h = 0; h < 2; h++) begin
                int dx, d;
                dx = 8 * q + 4 * h + j;
                if (dx < NC) begin
                  d = int'(rd_data[j][2*h]) - int'(rd_data[j][2*h+1]);
                  sad_hw[dy][dx] += (d < 0) ? -d : d;
                  n_absdiff++;
                end
              end
          end
      end
      checks++;
      if (compute_clocks - c_start != 5 * MB * MB) begin
        failures++;
        $display("FAIL row dy=%0d took %0d compute clocks", dy, compute_clocks - c_start);
      end
    end

    // compare every SAD and the best vector
    begin
      int best, bx, by, bad;
      best = 1 << 30; bx = -1; by = -1; bad = 0;
      for (int dy = 0; dy < NC; dy++)
        for (int dx = 0; dx < NC; dx++) begin
          int ref_sad;
          ref_sad = 0;
          for (int i = 0; i < MB; i++)
            for (int k = 0; k < MB; k++) begin
              int d;
              d = int'(area[dy + i][dx + k]) - int'(mb[i][k]);
              ref_sad += (d < 0) ? -d : d;
            end
          checks++;
          if (sad_hw[dy][dx] != ref_sad) begin
            failures++; bad++;
            if (bad < 5) $display("FAIL SAD (%0d,%0d) got %0d expected %0d", dx, dy, sad_hw[dy][dx], ref_sad);
          end
          if (sad_hw[dy][dx] < best) begin
            best = sad_hw[dy][dx]; bx = dx; by = dy;
          end
        end
      checks++;
      $display("best motion vector (%0d,%0d) SAD %0d", bx - D, by - D, best);
      if (bx != MVX || by != MVY) begin
        failures++; $display("FAIL best vector at (%0d,%0d), planted (%0d,%0d)", bx, by, MVX, MVY);
      end
    end

    // the prefetched strip: finish it, then send its last row through
    while (pf_next < MB * WPR) step();
    load_search_row(SA + MB - 1);
    for (int x = 0; x < SA; x += 16) begin
      for (int g = 0; g < 4; g++)
        for (int c = 0; c < 4; c++) begin
          rd_en[g][c] = 1'b1; rd_addr[g][c] = sa_addr(x + 4 * g + c);
        end
      step();
      for (int g = 0; g < 4; g++)
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (rd_data[g][c] !== area[SA + MB - 1][x + 4 * g + c]) begin
            failures++; $display("FAIL prefetched pixel %0d", x + 4 * g + c);
          end
        end
    end
    checks++;
    $display("clocks %0d, compute clocks %0d, absolute differences %0d, prefetched words %0d",
             cycle, compute_clocks, n_absdiff, n_prefetch);
    if (n_prefetch != MB * WPR || n_absdiff != NC * NC * MB * MB) begin
      failures++; $display("FAIL prefetch or work count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
