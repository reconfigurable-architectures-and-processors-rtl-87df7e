// tb_host_regfile_a: checks the host register file of architecture A:
// control bits, the one-clock go pulse, the configuration fields, the
// pattern-table write port (fields and the one-clock write strobe), and
// the result register that captures MV and SAD on the rising edge of done
// and clears its done bit when a new search is started.
// Expected values are computed in the testbench, independently of the RTL;
// sizes and stimuli are this testbench's own choice.
module tb_host_regfile_a;
  import me_a_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [1:0] wr_addr = 0, rd_addr = 0;
  logic [63:0] wr_data = 0, rd_data;
  logic core_rst, en, go, pm_we, done = 0;
  logic [SEL_W-1:0] sel_pat;
  logic [15:0] frame_w, frame_h, mb_x, mb_y;
  logic [PM_AW-1:0] pm_waddr;
  patt_entry_t pm_wdata;
  logic signed [MV_W-1:0] mv_x = 0, mv_y = 0;
  logic [SAD_W-1:0] sad = 0;
  int checks = 0, failures = 0, go_pulses = 0, we_pulses = 0;

  host_regfile_a dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (go) go_pulses++;
    if (pm_we) we_pulses++;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(logic [1:0] a, logic [63:0] d);
    @(negedge clk); wr_en = 1; wr_addr = a; wr_data = d;
    @(negedge clk); wr_en = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      logic [63:0] c, p;
      logic [1:0] sel;
      logic [7:0] x, y;
      logic [15:0] s;
      c = {$urandom, $urandom};
      wr(2'd1, c);
      check(frame_w == c[15:0] && frame_h == c[31:16] && mb_x == c[47:32] && mb_y == c[63:48], "config fields");
      p = {$urandom, $urandom};
      wr(2'd3, p);
      check(pm_waddr == p[9:0] && pm_wdata.see == p[10] && pm_wdata.ste == p[11] &&
            pm_wdata.npa == p[19:12] && pm_wdata.dx == p[27:20] && pm_wdata.dy == p[35:28] &&
            pm_wdata.raster == p[55:36], "pattern fields");
      sel = 2'($urandom);
      wr(2'd0, 64'h6 | (64'(sel) << 4));
      check(en && !core_rst && sel_pat == sel, "control bits");
      rd_addr = 2'd2; #1;
      check(rd_data[32] == 1'b0, "done bit cleared by go");
      x = 8'($urandom); y = 8'($urandom); s = 16'($urandom);
      @(negedge clk); mv_x = x; mv_y = y; sad = s; done = 1;
      @(negedge clk); mv_x = 0; mv_y = 0; sad = 0;
      @(negedge clk); #1;
      check(rd_data == {31'd0, 1'b1, s, y, x}, "result captured on done");
      done = 0;
      wr(2'd0, 64'h1);
      check(core_rst && !en, "core reset bit");
    end
    check(go_pulses == 100, $sformatf("go pulses %0d", go_pulses));
    check(we_pulses == 100, $sformatf("pattern write strobes %0d", we_pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
