// tb_me_core_a: checks the architecture-A motion estimation core (address
// unit, SAD unit and decision unit together) on a small 64x48 frame pair
// held in two frame memories. The reference frame is the current one moved
// by a known displacement plus texture noise. Full-search, three-step,
// diamond and example tables are run at several macroblocks and the MV and
// SAD are compared with a software model of the table walk on the same
// pixels.
// Expected values are computed in the testbench, independently of the RTL;
// sizes and stimuli are this testbench's own choice.
module tb_me_core_a;
  import me_a_pkg::*;
  import me_tb_pkg::*;
  localparam int W = 64, H = 48;
  logic clk = 0, rst_n = 0, en = 0, go = 0, pm_we = 0, done;
  logic [SEL_W-1:0] sel_pat = 0;
  logic [15:0] frame_w = W, frame_h = H, mb_x = 0, mb_y = 0;
  logic [PM_AW-1:0] pm_waddr = 0;
  patt_entry_t pm_wdata = '0;
  logic [ADDR_W-1:0] ref_raddr, sa_raddr;
  logic [WORD_W-1:0] mb_pixel, sa_pixel;
  logic signed [MV_W-1:0] mv_x, mv_y;
  logic [SAD_W-1:0] sad;
  sdu_state_t state;
  logic fm_we = 0;
  logic [ADDR_W-4:0] fm_waddr = 0;
  logic [WORD_W-1:0] fm_cur = 0, fm_ref = 0;
  int checks = 0, failures = 0;

  me_core_a dut (.*);
  frame_memory u_cur (.clk, .we(fm_we), .waddr(fm_waddr), .wdata(fm_cur), .raddr(ref_raddr), .rdata(mb_pixel));
  frame_memory u_ref (.clk, .we(fm_we), .waddr(fm_waddr), .wdata(fm_ref), .raddr(sa_raddr), .rdata(sa_pixel));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic search(int sel, int mbx, int mby);
    tent_t t[$];
    int mvx, mvy, s, nv, ns;
    build_table(sel, t);
    model(t, mbx, mby, W, H, mvx, mvy, s, nv, ns);
    @(negedge clk); sel_pat = 2'(sel); mb_x = 16'(mbx); mb_y = 16'(mby); go = 1;
    @(negedge clk); go = 0;
    while (!done) @(negedge clk);
    checks++;
    if (mv_x != mvx || mv_y != mvy || sad != SAD_W'(s)) begin
      failures++;
      $display("FAIL: sel %0d MB (%0d,%0d): (%0d,%0d) %0d expected (%0d,%0d) %0d",
               sel, mbx, mby, mv_x, mv_y, sad, mvx, mvy, s);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1; en = 1;
    for (int w = 0; w < W * H / 8; w++) begin
      @(negedge clk);
      for (int k = 0; k < 8; k++) begin
        fm_cur[k*8 +: 8] = 8'(cur_pix((w * 8 + k) % W, (w * 8 + k) / W));
        fm_ref[k*8 +: 8] = 8'(ref_pix((w * 8 + k) % W, (w * 8 + k) / W));
      end
      fm_we = 1; fm_waddr = (ADDR_W-3)'(w);
    end
    @(negedge clk); fm_we = 0;
    for (int sel = 0; sel < 4; sel++) begin
      tent_t t[$];
      build_table(sel, t);
      foreach (t[i]) begin
        @(negedge clk); pm_we = 1; pm_waddr = {2'(sel), 8'(i)}; pm_wdata = to_entry(t[i], W);
      end
    end
    @(negedge clk); pm_we = 0;
    search(0, 24, 16);
    for (int sel = 1; sel < 4; sel++) begin
      search(sel, 24, 16);
      search(sel, 0, 0);
      search(sel, 48, 32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
