// tb_me_system_a: end-to-end test of the architecture-A co-processor.
//
// Loads a QCIF-sized (176x144) synthetic current frame and a moved copy of
// it as the reference frame through the 64-bit frame-memory port, writes
// four search-pattern tables (full search, three-step, diamond, nine-point
// example) through the pattern register, and runs searches on an interior
// macroblock and on two corner macroblocks. Each result (MV and SAD) is
// compared with a software model of the table-driven search; the full
// search must also find the known displacement with SAD 0. The number of
// clocks spent scanning must be 32 per valid candidate, and each candidate
// outside the frame must cost exactly two dead clocks.
module tb_me_system_a;
  import me_a_pkg::*;
  import me_tb_pkg::*;

  localparam int W = 176, H = 144;

  logic clk = 0, rst_n = 0;
  logic reg_wr = 0;
  logic [1:0] reg_waddr = 0, reg_raddr = 0;
  logic [63:0] reg_wdata = 0, reg_rdata;
  logic fm_we = 0, fm_sel = 0;
  logic [ADDR_W-4:0] fm_waddr = 0;
  logic [WORD_W-1:0] fm_wdata = 0;
  logic done;

  int checks = 0, failures = 0;

  me_system_a dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int scan_cycles, skip_cycles;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.u_sdu.scan_advance) scan_cycles++;
    if (dut.u_core.state == S_SKIP) skip_cycles++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic reg_write(logic [1:0] a, logic [63:0] d);
    @(negedge clk); reg_wr = 1; reg_waddr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask

  task automatic load_frames();
    for (int w = 0; w < W * H / 8; w++) begin
      logic [63:0] c, r;
      for (int k = 0; k < 8; k++) begin
        int p;
        p = w * 8 + k;
        c[k*8 +: 8] = 8'(cur_pix(p % W, p / W));
        r[k*8 +: 8] = 8'(ref_pix(p % W, p / W));
      end
      @(negedge clk); fm_we = 1; fm_sel = 0; fm_waddr = 17'(w); fm_wdata = c;
      @(negedge clk); fm_we = 1; fm_sel = 1; fm_waddr = 17'(w); fm_wdata = r;
    end
    @(negedge clk); fm_we = 0;
  endtask

  task automatic load_tables();
    for (int sel = 0; sel < 4; sel++) begin
      tent_t t[$];
      build_table(sel, t);
      foreach (t[i]) begin
        patt_entry_t e;
        logic [63:0] d;
        e = to_entry(t[i], W);
        d = '0;
        d[9:0] = {2'(sel), 8'(i)}; d[10] = e.see; d[11] = e.ste;
        d[19:12] = e.npa; d[27:20] = e.dx; d[35:28] = e.dy; d[55:36] = e.raster;
        reg_write(2'd3, d);
      end
    end
  endtask

  task automatic run_search(int sel, int mbx, int mby, bit expect_exact);
    tent_t t[$];
    int mvx, mvy, sad, nv, ns, cycles;
    logic [63:0] res;
    build_table(sel, t);
    model(t, mbx, mby, W, H, mvx, mvy, sad, nv, ns);
    reg_write(2'd1, {16'(mby), 16'(mbx), 16'(H), 16'(W)});
    scan_cycles = 0; skip_cycles = 0; cycles = 0;
    reg_write(2'd0, 64'h2 | 64'h4 | (64'(sel) << 4));
    cycles = 2;
    repeat (2) @(posedge clk);
    while (!done) begin @(posedge clk); cycles++; end
    @(negedge clk); reg_raddr = 2'd2; #1 res = reg_rdata;
    check(res[32] == 1'b1, "done bit in result register");
    check($signed(res[7:0]) == mvx && $signed(res[15:8]) == mvy,
          $sformatf("sel %0d MB(%0d,%0d): MV (%0d,%0d) expected (%0d,%0d)", sel, mbx, mby,
                    $signed(res[7:0]), $signed(res[15:8]), mvx, mvy));
    check(res[31:16] == 16'(sad), $sformatf("sel %0d SAD %0d expected %0d", sel, res[31:16], sad));
    check(scan_cycles == 32 * nv, $sformatf("scan clocks %0d expected 32*%0d", scan_cycles, nv));
    check(skip_cycles == 2 * ns, $sformatf("skip clocks %0d expected 2*%0d", skip_cycles, ns));
    if (expect_exact)
      check(mvx == -SX && mvy == -SY && sad == 0, "model finds the planted displacement");
    $display("sel %0d MB(%0d,%0d): mv (%0d,%0d) sad %0d, %0d valid, %0d skipped, %0d clocks",
             sel, mbx, mby, mvx, mvy, sad, nv, ns, cycles);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_frames();
    load_tables();
    run_search(0, 80, 64, 1);
    run_search(1, 80, 64, 0);
    run_search(2, 80, 64, 0);
    run_search(3, 80, 64, 0);
    run_search(1, 0, 0, 0);
    run_search(2, 160, 128, 0);
    run_search(0, 0, 128, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
