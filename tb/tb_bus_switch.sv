// Self-checking testbench for bus_switch.
// For each bus partition (one, two and four groups) and random choices of
// which buses carry the DMA word, it checks every bus as seen from every
// group: the bank-A word or DMA word where the bus segment is joined to the
// group, zero and vis low where it is cut off. The expected partition of
// the groups is written out here independently of the design.
module tb_bus_switch;
  import vsp_mem_pkg::*;

  part_e part;
  logic [3:0] bus_from_dma;
  logic [31:0] dma_data;
  logic [3:0][31:0] a_rdata;
  logic [3:0][3:0][31:0] bus_view;
  logic [3:0][3:0] vis;
  int checks = 0, failures = 0;
  int seen_part [3] = '{0, 0, 0};

  bus_switch dut (.*);

  // Segment a group belongs to under each partition.
  function automatic int seg(input part_e p, input int g);
    case (p)
      PART_1:  seg = 0;
      PART_2:  seg = (g < 2) ? 0 : 1;
      default: seg = g;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  part_e modes [3] = '{PART_1, PART_2, PART_4};

  initial begin
    for (int m = 0; m < 3; m++) begin
      for (int n = 0; n < 40; n++) begin
        part = modes[m];
        bus_from_dma = 4'(n);
        dma_data = $urandom;
        for (int j = 0; j < 4; j++) a_rdata[j] = $urandom;
        #1;
        seen_part[m]++;
        for (int g = 0; g < 4; g++)
          for (int j = 0; j < 4; j++) begin
            logic joined;
            logic [31:0] e;
            joined = seg(part, g) == seg(part, j);
            e = !joined ? 32'd0 : (bus_from_dma[j] ? dma_data : a_rdata[j]);
            checks += 2;
            if (vis[g][j] !== joined) begin
              failures++;
              $display("FAIL vis part %0d group %0d bus %0d", m, g, j);
            end
            if (bus_view[g][j] !== e) begin
              failures++;
              $display("FAIL view part %0d group %0d bus %0d: got %h expected %h",
                       m, g, j, bus_view[g][j], e);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
