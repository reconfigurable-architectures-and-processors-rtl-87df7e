// tb_pattern_memory: checks the pattern table of architecture A. Random
// entries are written to every address, then read back through the
// {sel_pat, pa} read address (the read is combinational) and compared with
// a shadow copy; a second pass rewrites a few entries and re-checks.
// Expected values are computed in the testbench, independently of the RTL;
// sizes and stimuli are this testbench's own choice.
module tb_pattern_memory;
  import me_a_pkg::*;
  logic clk = 0, we = 0;
  logic [PM_AW-1:0] waddr = 0;
  patt_entry_t wdata = '0, entry;
  logic [SEL_W-1:0] sel_pat = 0;
  logic [NPA_W-1:0] pa = 0;
  patt_entry_t shadow [2**PM_AW];
  int checks = 0, failures = 0;

  pattern_memory dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(int a);
    patt_entry_t e;
    e = patt_entry_t'({$urandom, $urandom});
    shadow[a] = e;
    @(negedge clk); we = 1; waddr = PM_AW'(a); wdata = e;
    @(negedge clk); we = 0;
  endtask

  task automatic rd_all();
    for (int a = 0; a < 2**PM_AW; a++) begin
      {sel_pat, pa} = PM_AW'(a);
      #1;
      checks++;
      if (entry != shadow[a]) begin failures++; $display("FAIL: address %0d", a); end
    end
  endtask

  initial begin
    for (int a = 0; a < 2**PM_AW; a++) wr(a);
    rd_all();
    for (int i = 0; i < 50; i++) wr($urandom % (2**PM_AW));
    rd_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
