// tb_agu_a: checks the address generation unit of architecture A: the
// pattern table write port, pattern-address loads and increments, and the
// two pixel addresses. For each candidate, the search-area address must be
// step base + the entry's raster offset + line*width + group*8, and the
// current-MB address MB base + line*width + group*8, for all 32 groups.
// Expected values are computed in the testbench, independently of the RTL;
// sizes and stimuli are this testbench's own choice.
module tb_agu_a;
  import me_a_pkg::*;
  logic clk = 0, rst_n = 0, pm_we = 0, ld_patt = 0, inc_patt = 0, scan_advance = 0;
  logic [PM_AW-1:0] pm_waddr = 0;
  patt_entry_t pm_wdata = '0, entry;
  logic [SEL_W-1:0] sel_pat = 0;
  logic [NPA_W-1:0] npa = 0, pa;
  logic [ADDR_W-1:0] step_base_addr = 0, mb_addr = 0, pixel_addr, mb_pixel_addr;
  logic [15:0] frame_w = 176;
  logic [3:0] mb_lin;
  logic mb_col, scan_last;
  logic [IDX_W-1:0] scan_idx;
  patt_entry_t shadow [2**PM_AW];
  int checks = 0, failures = 0;

  agu_a dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic scan_check(int a);
    int bad;
    bad = 0;
    for (int g = 0; g < SCAN_LEN; g++) begin
      int off;
      off = (g / 2) * frame_w + (g % 2) * 8;
      #1;
      if (entry != shadow[a] || scan_idx != IDX_W'(g) || scan_last != (g == SCAN_LEN - 1) ||
          pixel_addr != ADDR_W'(step_base_addr + shadow[a].raster + off) ||
          mb_pixel_addr != ADDR_W'(mb_addr + off)) bad++;
      @(negedge clk); scan_advance = 1;
      @(negedge clk); scan_advance = 0;
    end
    checks++;
    if (bad) begin failures++; $display("FAIL: table address %0d: %0d groups wrong", a, bad); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int a = 0; a < 2**PM_AW; a++) begin
      shadow[a] = patt_entry_t'({$urandom, $urandom});
      shadow[a].raster = ADDR_W'($urandom % 4096);
      @(negedge clk); pm_we = 1; pm_waddr = PM_AW'(a); pm_wdata = shadow[a];
    end
    @(negedge clk); pm_we = 0;
    for (int n = 0; n < 40; n++) begin
      int a;
      sel_pat = 2'($urandom); npa = 8'($urandom);
      frame_w = 16'(64 + 8 * ($urandom % 60));
      step_base_addr = ADDR_W'($urandom % 100000); mb_addr = ADDR_W'($urandom % 100000);
      @(negedge clk); ld_patt = 1;
      @(negedge clk); ld_patt = 0;
      a = {sel_pat, npa};
      checks++;
      if (pa != npa) begin failures++; $display("FAIL: pa %0d after load of %0d", pa, npa); end
      scan_check(a);
      @(negedge clk); inc_patt = 1;
      @(negedge clk); inc_patt = 0;
      scan_check({sel_pat, 8'(npa + 1)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
