// tb_pattern_generator: checks the pattern-address counter of
// architecture A. Random sequences of load (ld_patt with an NPA value) and
// increment (inc_patt) requests are applied and the counter is compared with
// a reference every clock; load must win when both are requested.
// Expected values are computed in the testbench, independently of the RTL;
// sizes and stimuli are this testbench's own choice.
module tb_pattern_generator;
  import me_a_pkg::*;
  logic clk = 0, rst_n = 0, ld_patt = 0, inc_patt = 0;
  logic [NPA_W-1:0] npa = 0, pa, exp_pa = 0;
  int checks = 0, failures = 0;

  pattern_generator dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++; if (pa != 0) begin failures++; $display("FAIL: reset value %0d", pa); end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ld_patt  = ($urandom % 4) == 0;
      inc_patt = ($urandom % 2) == 0;
      npa      = NPA_W'($urandom);
      if (ld_patt) exp_pa = npa; else if (inc_patt) exp_pa = exp_pa + 1'b1;
      @(posedge clk); #1;
      checks++;
      if (pa != exp_pa) begin failures++; $display("FAIL: pa %0d expected %0d", pa, exp_pa); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
