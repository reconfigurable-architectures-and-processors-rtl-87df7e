// tb_sdu: checks the search decision unit of architecture A, the state
// machine that walks the pattern table. It is run with the real address
// unit (agu_a) and a behavioural SAD unit that returns, 3 clocks after each
// candidate's last group as the real one does, a synthetic cost
// 40 + 6*floor(|dx-3|/2) + 4*|dy+2| of the candidate's absolute displacement.
// The flat bottom of this cost makes ties, so the "less than or equal"
// update rule is visible. Full-search, three-step, diamond and the
// nine-point example tables are run at an inner and at corner macroblocks
// and compared with a software walk of the same table; candidates outside
// the frame must be skipped in 2 clocks each.
// Expected values are computed in the testbench, independently of the RTL;
// sizes and stimuli are this testbench's own choice.
module tb_sdu;
  import me_a_pkg::*;
  import me_tb_pkg::*;
  localparam int W = 176, H = 144;
  logic clk = 0, rst_n = 0, en = 0, go = 0;
  logic [15:0] frame_w = W, frame_h = H, mb_x = 0, mb_y = 0;
  patt_entry_t entry, pm_wdata = '0;
  logic pm_we = 0;
  logic [PM_AW-1:0] pm_waddr = 0;
  logic [SEL_W-1:0] sel_pat = 0;
  logic scan_last, scan_advance, ld_patt, inc_patt, mb_col;
  logic [IDX_W-1:0] scan_idx;
  logic [SAD_W-1:0] sad = 0, sad_out;
  logic sad_valid = 0;
  logic [NPA_W-1:0] npa, pa;
  logic [ADDR_W-1:0] step_base_addr, mb_addr, pixel_addr, mb_pixel_addr;
  logic sadu_valid, sadu_first, sadu_last, sadu_fill, done;
  logic [3:0] mb_lin;
  logic signed [MV_W-1:0] mv_x, mv_y;
  sdu_state_t state;
  int checks = 0, failures = 0, skip_clocks = 0, scan_clocks = 0;

  sdu dut (.*);
  agu_a u_agu (.clk, .rst_n, .pm_we, .pm_waddr, .pm_wdata, .sel_pat, .ld_patt, .inc_patt,
               .npa, .step_base_addr, .mb_addr, .scan_advance, .frame_w, .entry, .pa,
               .mb_lin, .mb_col, .scan_last, .scan_idx, .pixel_addr, .mb_pixel_addr);
  always #5 clk = ~clk;

  function automatic int cost(int dx, int dy);
    int ax, ay;
    ax = (dx > 3) ? dx - 3 : 3 - dx;
    ay = (dy > -2) ? dy + 2 : -2 - dy;
    return 40 + 6 * (ax / 2) + 4 * ay;
  endfunction

  // behavioural SAD unit: same 3-clock latency as sadu_a
  int pend[$];
  logic [3:0] lastpipe = 0;
  int cand_cost = 0;
  always @(posedge clk) begin
    if (sadu_valid && sadu_first) begin
      int dx, dy;
      dx = int'(pixel_addr % W) - int'(mb_x);
      dy = int'(pixel_addr / W) - int'(mb_y);
      cand_cost = cost(dx, dy);
    end
    if (sadu_valid && sadu_last) pend.push_back(cand_cost);
    lastpipe <= {lastpipe[2:0], sadu_valid && sadu_last};
    sad_valid <= 1'b0;
    if (lastpipe[1]) begin sad_valid <= 1'b1; sad <= SAD_W'(pend.pop_front()); end
    if (state == S_SKIP) skip_clocks++;
    if (sadu_valid) scan_clocks++;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic void walk(tent_t t[$], int mbx, int mby, output int mvx, output int mvy,
                               output int best, output int nv, output int ns);
    int accx, accy, bdx, bdy, bnpa, pa_m;
    bit improved;
    accx = 0; accy = 0; best = 65535; bdx = 0; bdy = 0; bnpa = 0; pa_m = 0; improved = 0;
    nv = 0; ns = 0;
    for (int guard = 0; guard < 10000; guard++) begin
      tent_t e;
      int cx, cy;
      e = t[pa_m];
      cx = mbx + accx + e.dx; cy = mby + accy + e.dy;
      if (cx >= 0 && cy >= 0 && cx + 16 <= W && cy + 16 <= H) begin
        int s;
        s = cost(accx + e.dx, accy + e.dy);
        nv++;
        if (s <= best) begin best = s; bdx = e.dx; bdy = e.dy; bnpa = e.npa; improved = 1; end
      end else ns++;
      if (e.ste || e.see) begin
        accx += bdx; accy += bdy; bdx = 0; bdy = 0;
        if (e.see) break;
        pa_m = improved ? bnpa : e.npa;
        improved = 0;
      end else pa_m++;
    end
    mvx = accx; mvy = accy;
  endfunction

  task automatic search(int sel, int mbx, int mby);
    tent_t t[$];
    int mvx, mvy, best, nv, ns, sk0, sc0;
    build_table(sel, t);
    walk(t, mbx, mby, mvx, mvy, best, nv, ns);
    sk0 = skip_clocks; sc0 = scan_clocks;
    @(negedge clk); sel_pat = 2'(sel); mb_x = 16'(mbx); mb_y = 16'(mby); go = 1;
    @(negedge clk); go = 0;
    while (!done) @(negedge clk);
    checks++;
    if (mv_x != mvx || mv_y != mvy || sad_out != SAD_W'(best) ||
        skip_clocks - sk0 != 2 * ns || scan_clocks - sc0 != 32 * nv) begin
      failures++;
      $display("FAIL: sel %0d MB (%0d,%0d): (%0d,%0d) %0d, expected (%0d,%0d) %0d; skip %0d/%0d scan %0d/%0d",
               sel, mbx, mby, mv_x, mv_y, sad_out, mvx, mvy, best,
               skip_clocks - sk0, 2 * ns, scan_clocks - sc0, 32 * nv);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1; en = 1;
    for (int sel = 0; sel < 4; sel++) begin
      tent_t t[$];
      build_table(sel, t);
      foreach (t[i]) begin
        @(negedge clk); pm_we = 1; pm_waddr = {2'(sel), 8'(i)}; pm_wdata = to_entry(t[i], W);
      end
    end
    @(negedge clk); pm_we = 0;
    for (int sel = 0; sel < 4; sel++) begin
      search(sel, 80, 64);
      search(sel, 0, 0);
      search(sel, 160, 128);
      search(sel, 4, 120);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
