// Self-checking testbench for bank_b_wmux.
// Random bus words, function-unit results, reachability masks and source
// selections; checks the selected 16-bit word and the legal flag against
// the expected choice, and that an unreachable source gives zero.
module tb_bank_b_wmux;
  import vsp_mem_pkg::*;

  bsrc_e src;
  logic [1:0] idx;
  logic half;
  logic [3:0][31:0] bus_view;
  logic [3:0] vis;
  logic [3:0][15:0] fu_result;
  logic [15:0] wdata;
  logic legal;
  int checks = 0, failures = 0;
  int n_bus = 0, n_fu = 0, n_illegal = 0;

  bank_b_wmux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) begin
      logic [15:0] e;
      src = bsrc_e'($urandom_range(0, 1));
      idx = 2'($urandom); half = 1'($urandom); vis = 4'($urandom);
      for (int j = 0; j < 4; j++) begin
        bus_view[j] = $urandom; fu_result[j] = 16'($urandom);
      end
      #1;
      if (!vis[idx]) begin
        e = '0; n_illegal++;
      end else if (src == SRC_FU) begin
        e = fu_result[idx]; n_fu++;
      end else begin
        e = half ? bus_view[idx][31:16] : bus_view[idx][15:0]; n_bus++;
      end
      checks += 2;
      if (legal !== vis[idx]) begin
        failures++; $display("FAIL legal flag");
      end
      if (wdata !== e) begin
        failures++;
        $display("FAIL wdata src %0d idx %0d half %0d: got %h expected %h", src, idx, half, wdata, e);
      end
    end
    checks++;
    if (n_bus == 0 || n_fu == 0 || n_illegal == 0) begin
      failures++; $display("FAIL a source kind never chosen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
