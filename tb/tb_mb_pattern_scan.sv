// tb_mb_pattern_scan: checks the macroblock scan counter of architecture
// A. With a random frame width and random stalls on advance, the scan must
// step through 16 lines of two 8-pixel groups, give the byte offset
// line*width + group*8, raise last on the 32nd group and wrap, and return
// to the start on clear.
// Expected values are computed in the testbench, independently of the RTL;
// sizes and stimuli are this testbench's own choice.
module tb_mb_pattern_scan;
  import me_a_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, advance = 0;
  logic [15:0] frame_w = 176;
  logic [3:0] mb_lin;
  logic mb_col, last;
  logic [IDX_W-1:0] idx;
  logic [ADDR_W-1:0] offset;
  int checks = 0, failures = 0;

  mb_pattern_scan dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_pos(int g);
    checks++;
    if (idx != IDX_W'(g) || offset != ADDR_W'((g / 2) * frame_w + (g % 2) * 8) ||
        last != (g == SCAN_LEN - 1) || mb_lin != 4'(g / 2) || mb_col != g[0]) begin
      failures++;
      $display("FAIL: group %0d: idx %0d offset %0d last %0d", g, idx, offset, last);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int run = 0; run < 20; run++) begin
      int stop;
      frame_w = 16'(64 + 8 * ($urandom % 90));
      stop = (run % 2) ? SCAN_LEN : 1 + $urandom % SCAN_LEN;
      for (int g = 0; g < stop; g++) begin
        while (($urandom % 3) == 0) begin
          @(negedge clk); advance = 0; expect_pos(g);
        end
        @(negedge clk); advance = 1; expect_pos(g);
      end
      @(negedge clk); advance = 0;
      if (stop == SCAN_LEN) expect_pos(0);
      else begin
        clear = 1; @(negedge clk); clear = 0; expect_pos(0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
