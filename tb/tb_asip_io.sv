// tb_asip_io: checks the ASIP port unit. (1) A rising edge of rst&en
// starts programming mode: 2048 bytes are fetched from the program area of
// the shared memory and written little-endian as 1024 words, in at least
// 2048 clocks. (2) The AGU's requests pass to the bus only when the port is
// free. (3) An MV output writes mv[7:0] then mv[15:8] to the MV address
// with the write strobe and toggles done once per byte.
// Expected values are computed in the testbench, independently of the RTL;
// sizes and stimuli are this testbench's own choice.
module tb_asip_io;
  import asip_pkg::*;
  logic clk = 0, rst_n = 0, rst_pin = 0, en_pin = 0;
  logic prog_mode, pm_we;
  logic [PC_W-1:0] pm_waddr;
  logic [DW-1:0] pm_wdata;
  logic agu_req = 0, agu_gnt;
  logic [EXT_AW-1:0] agu_addr = 0, ext_addr;
  logic mv_start = 0, mv_busy;
  logic [DW-1:0] mv_value = 0;
  logic [7:0] ext_data_i, ext_data_o;
  logic ext_data_oe, ext_oe_we, ext_req, ext_gnt, done;
  logic [DW-1:0] pm [PM_WORDS];
  int checks = 0, failures = 0, words = 0, toggles = 0, prog_clocks = 0;
  logic done_q = 0;

  asip_io dut (.*);
  ext_ram_model ram (.clk, .addr(ext_addr), .data_w(ext_data_o), .data_oe(ext_data_oe),
                     .oe_we(ext_oe_we), .req(ext_req), .gnt(ext_gnt), .q(ext_data_i));
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && pm_we) begin pm[pm_waddr] = pm_wdata; words++; end
    if (rst_n && prog_mode) prog_clocks++;
    if (rst_n && done != done_q) toggles++;
    done_q = done;
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int bad;
    for (int i = 0; i < 2048; i++) ram.mem[PROG_BASE + i] = 8'($urandom);
    foreach (pm[i]) pm[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // AGU traffic passes while the port is idle
    @(negedge clk); agu_req = 1; agu_addr = 20'h80123;
    #1 check(ext_req && ext_addr == 20'h80123 && !ext_oe_we, "AGU request passed through");
    while (!ext_gnt) @(negedge clk);
    #1 check(agu_gnt, "grant passed to the AGU");
    @(negedge clk); agu_req = 0;
    // programming mode
    @(negedge clk); rst_pin = 1; en_pin = 1;
    @(negedge clk); agu_req = 1;
    #1 check(prog_mode && !agu_gnt, "AGU held off during programming");
    while (prog_mode) @(negedge clk);
    agu_req = 0; rst_pin = 0;
    check(words == 1024, $sformatf("%0d words loaded", words));
    check(prog_clocks >= 2048, $sformatf("programming took %0d clocks", prog_clocks));
    bad = 0;
    for (int i = 0; i < 1024; i++)
      if (pm[i] != {ram.mem[PROG_BASE + 2 * i + 1], ram.mem[PROG_BASE + 2 * i]}) bad++;
    check(bad == 0, $sformatf("%0d program words wrong", bad));
    // holding rst&en high does not restart programming
    repeat (5) @(negedge clk);
    check(!prog_mode, "programming runs once per rst&en edge");
    // MV outputs
    for (int n = 0; n < 5; n++) begin
      logic [15:0] v;
      v = 16'($urandom);
      @(negedge clk); mv_start = 1; mv_value = v;
      @(negedge clk); mv_start = 0;
      while (mv_busy) @(negedge clk);
      @(negedge clk);
      check(ram.mem[MV_ADDR] == v[7:0] && ram.mem[MV_ADDR + 1] == v[15:8],
            $sformatf("MV bytes %h %h for %h", ram.mem[MV_ADDR], ram.mem[MV_ADDR + 1], v));
    end
    check(toggles == 10, $sformatf("done toggled %0d times", toggles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
