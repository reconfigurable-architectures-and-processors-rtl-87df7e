// tb_frame_memory: checks the 8-bank frame memory of architecture A at a
// reduced size (AW=14, 16 kB). The memory is filled with random 64-bit
// words, then 8 consecutive pixels are read from random byte addresses,
// aligned or not; the data must appear one clock after the address.
// Expected values are computed in the testbench, independently of the RTL;
// sizes and stimuli are this testbench's own choice.
module tb_frame_memory;
  import me_a_pkg::*;
  localparam int AW = 14;
  logic clk = 0, we = 0;
  logic [AW-4:0] waddr = 0;
  logic [WORD_W-1:0] wdata = 0, rdata;
  logic [AW-1:0] raddr = 0;
  logic [7:0] bytes [2**AW];
  int checks = 0, failures = 0;

  frame_memory #(.AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int w = 0; w < 2**(AW-3); w++) begin
      logic [63:0] d;
      d = {$urandom, $urandom};
      for (int k = 0; k < 8; k++) bytes[w * 8 + k] = d[k*8 +: 8];
      @(negedge clk); we = 1; waddr = (AW-3)'(w); wdata = d;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      logic [63:0] exp_d;
      int a;
      a = (i < 16) ? i : $urandom % (2**AW - 8);
      @(negedge clk); raddr = AW'(a);
      for (int k = 0; k < 8; k++) exp_d[k*8 +: 8] = bytes[a + k];
      @(negedge clk);
      checks++;
      if (rdata != exp_d) begin failures++; $display("FAIL: address %0d: %h expected %h", a, rdata, exp_d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
