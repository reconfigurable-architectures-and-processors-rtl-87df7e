// tb_program_memory: checks the 1024 x 16-bit ASIP program memory: words
// written through the loader port are read back one clock after the read
// address when the read enable is high, and the output holds its value
// while the read enable is low.
// Expected values are computed in the testbench, independently of the RTL;
// sizes and stimuli are this testbench's own choice.
module tb_program_memory;
  import asip_pkg::*;
  logic clk = 0, we = 0, re = 0;
  logic [9:0] waddr = 0, raddr = 0;
  logic [DW-1:0] wdata = 0, rdata;
  logic [DW-1:0] shadow [PM_WORDS];
  int checks = 0, failures = 0;

  program_memory dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < PM_WORDS; i++) begin
      shadow[i] = 16'($urandom);
      @(negedge clk); we = 1; waddr = 10'(i); wdata = shadow[i];
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 4000; i++) begin
      logic [DW-1:0] hold;
      int a;
      a = $urandom % PM_WORDS;
      hold = rdata;
      @(negedge clk); raddr = 10'(a); re = (i % 4 != 3);
      @(negedge clk);
      checks++;
      if (rdata != (re ? shadow[a] : hold)) begin
        failures++; $display("FAIL: address %0d re %0d: %h", a, re, rdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
