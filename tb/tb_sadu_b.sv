// tb_sadu_b: checks the serial SAD unit of the ASIP (one pixel per clock)
// at its default width. Random current-MB and search-area scratchpads are
// modelled in the testbench; SAD16 operations with random line and origin
// coordinates must take 16 clocks, read the right pixels and return
// acc_in plus the sum of absolute differences of one 16-pixel line.
// Expected values are computed in the testbench, independently of the RTL;
// sizes and stimuli are this testbench's own choice.
module tb_sadu_b;
  import asip_pkg::*;
  logic clk = 0, rst_n = 0, active = 0;
  logic [DW-1:0] acc_in = 0, cand = 0, origin = 0, result;
  logic [7:0] mb_raddr;
  logic [7:0] mb_rdata;
  logic [9:0] sa_raddr;
  logic [7:0] sa_rdata;
  logic last;
  logic [7:0] mbm [256];
  logic [7:0] sam [1024];
  int checks = 0, failures = 0;

  sadu_b dut (.*);
  assign mb_rdata = mbm[mb_raddr];
  assign sa_rdata = sam[sa_raddr];
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (mbm[i]) mbm[i] = 8'($urandom);
    foreach (sam[i]) sam[i] = 8'($urandom);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int tx, ty, cy, e, clocks;
      tx = $urandom % 17; ty = $urandom % 17; cy = ty + $urandom % 16;
      acc_in = 16'($urandom % 20000);
      cand = {8'(cy), 8'(tx)}; origin = {8'(ty), 8'(tx)};
      e = acc_in;
      for (int c = 0; c < 16; c++) begin
        int a, b;
        a = mbm[(cy - ty) * 16 + c]; b = sam[cy * 32 + tx + c];
        e += (a > b) ? a - b : b - a;
      end
      active = 1; clocks = 1;
      #1;
      while (!last) begin @(negedge clk); clocks++; end
      checks++;
      if (result != 16'(e) || clocks != 16) begin
        failures++; $display("FAIL: result %0d expected %0d after %0d clocks", result, e, clocks);
      end
      @(negedge clk); active = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
