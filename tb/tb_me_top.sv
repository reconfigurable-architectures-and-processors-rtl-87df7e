// tb_me_top: whole-design test of both co-processors at their default
// sizes (1 MB frame memories for architecture A, 1 MB shared memory and the
// 2 kB program memory for architecture B).
//
// Architecture A: a QCIF-sized frame pair is loaded, the full-search,
// three-step, diamond and nine-point example tables are written, and
// searches are run while switching algorithms; results are compared with a
// software model of the table-driven search. Architecture B: firmware with
// a full search is uploaded through the data port and run on the same
// frames held in the shared memory; the MV bytes on the data port are
// compared with a software full search. Both run at the same time.
// Every mechanism is counted and must occur at least once: candidates
// skipped at the frame border, step ends, search ends, current-MB cache
// fills and reuses, algorithm switches; firmware upload, LD in parallel
// with execution, SAD16 stalls, taken and not-taken jumps, bus waits and
// MV output toggles.
// Expected values are computed in the testbench, independently of the RTL;
// sizes and stimuli are this testbench's own choice.
module tb_me_top;
  import me_a_pkg::*;
  import asip_pkg::*;
  import me_tb_pkg::*;
  import asip_tb_pkg::*;

  localparam int W = 176, H = 144, MBX = 64, MBY = 48, RNG = 4;

  logic clk = 0, rst_n = 0;
  logic a_reg_wr = 0;
  logic [1:0] a_reg_waddr = 0, a_reg_raddr = 0;
  logic [63:0] a_reg_wdata = 0, a_reg_rdata;
  logic a_fm_we = 0, a_fm_sel = 0;
  logic [me_a_pkg::ADDR_W-4:0] a_fm_waddr = 0;
  logic [WORD_W-1:0] a_fm_wdata = 0;
  logic a_done;
  logic b_rst = 0, b_en = 0;
  logic [19:0] b_addr;
  logic [7:0] b_data_i, b_data_o;
  logic b_data_oe, b_oe_we, b_req, b_gnt, b_done, b_prog_mode;

  int checks = 0, failures = 0;

  me_top dut (.*);
  ext_ram_model ram (.clk, .addr(b_addr), .data_w(b_data_o), .data_oe(b_data_oe),
                     .oe_we(b_oe_we), .req(b_req), .gnt(b_gnt), .q(b_data_i));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_skip, n_step, n_search_end, n_fill, n_reuse, n_switch;
  int n_prog, n_ld_overlap, n_sad_stall, n_jt, n_jn, n_toggle;
  logic b_done_q = 0;
  sdu_state_t st_q = S_IDLE;
  always @(posedge clk) if (rst_n) begin
    sdu_state_t st;
    st = dut.u_arch_a.u_core.state;
    if (st == S_SKIP && st_q != S_SKIP) n_skip++;
    if (st == S_STEP) n_step++;
    if (st == S_DONE && st_q != S_DONE) n_search_end++;
    if (dut.u_arch_a.u_core.u_sdu.sadu_valid && dut.u_arch_a.u_core.sadu_first) begin
      if (dut.u_arch_a.u_core.sadu_fill) n_fill++; else n_reuse++;
    end
    st_q = st;
    if (b_prog_mode) n_prog++;
    if (dut.u_arch_b.agu_busy && dut.u_arch_b.v && !dut.u_arch_b.stall && dut.u_arch_b.d.op != OP_LD) n_ld_overlap++;
    if (dut.u_arch_b.v && dut.u_arch_b.d.op == OP_SAD16 && dut.u_arch_b.stall) n_sad_stall++;
    if (dut.u_arch_b.v && !dut.u_arch_b.stall && dut.u_arch_b.d.op == OP_J) begin
      if (dut.u_arch_b.jump_taken) n_jt++; else n_jn++;
    end
    if (b_done != b_done_q) n_toggle++;
    b_done_q = b_done;
  end

  logic [7:0] out_bytes[$];
  always @(posedge clk) if (rst_n && b_data_oe && b_oe_we) out_bytes.push_back(b_data_o);

  // ---------------- architecture A host ----------------
  task automatic reg_write(logic [1:0] a, logic [63:0] d);
    @(negedge clk); a_reg_wr = 1; a_reg_waddr = a; a_reg_wdata = d;
    @(negedge clk); a_reg_wr = 0;
  endtask

  task automatic a_load();
    for (int w = 0; w < W * H / 8; w++) begin
      logic [63:0] c, r;
      for (int k = 0; k < 8; k++) begin
        int p;
        p = w * 8 + k;
        c[k*8 +: 8] = 8'(cur_pix(p % W, p / W));
        r[k*8 +: 8] = 8'(ref_pix(p % W, p / W));
      end
      @(negedge clk); a_fm_we = 1; a_fm_sel = 0; a_fm_waddr = 17'(w); a_fm_wdata = c;
      @(negedge clk); a_fm_we = 1; a_fm_sel = 1; a_fm_waddr = 17'(w); a_fm_wdata = r;
    end
    @(negedge clk); a_fm_we = 0;
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

  int last_sel = -1;
  task automatic a_search(int sel, int mbx, int mby);
    tent_t t[$];
    int mvx, mvy, sad, nv, ns;
    logic [63:0] res;
    if (last_sel >= 0 && sel != last_sel) n_switch++;
    last_sel = sel;
    build_table(sel, t);
    model(t, mbx, mby, W, H, mvx, mvy, sad, nv, ns);
    reg_write(2'd1, {16'(mby), 16'(mbx), 16'(H), 16'(W)});
    reg_write(2'd0, 64'h2 | 64'h4 | (64'(sel) << 4));
    repeat (2) @(posedge clk);
    while (!a_done) @(posedge clk);
    @(negedge clk); a_reg_raddr = 2'd2; #1 res = a_reg_rdata;
    check($signed(res[7:0]) == mvx && $signed(res[15:8]) == mvy && res[31:16] == 16'(sad),
          $sformatf("A sel %0d MB(%0d,%0d): got (%0d,%0d) %0d, expected (%0d,%0d) %0d", sel, mbx, mby,
                    $signed(res[7:0]), $signed(res[15:8]), res[31:16], mvx, mvy, sad));
  endtask

  // ---------------- architecture B host ----------------
  int bx, by, bbest;
  task automatic b_prepare();
    logic [15:0] prog[$];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        ram.mem[y * W + x]             = 8'(cur_pix(x, y));
        ram.mem[20'h80000 + y * W + x] = 8'(ref_pix(x, y));
      end
    fsbm_program(prog, W, H, MBX, MBY, RNG);
    for (int i = 0; i < 1024; i++) begin
      logic [15:0] wd;
      wd = (i < prog.size()) ? prog[i] : i_j(0, i);
      ram.mem[20'hFF800 + 2 * i]     = wd[7:0];
      ram.mem[20'hFF800 + 2 * i + 1] = wd[15:8];
    end
    bbest = 1 << 30;
    for (int ty = 0; ty <= 2 * RNG; ty++)
      for (int tx = 0; tx <= 2 * RNG; tx++) begin
        int s;
        s = block_sad(MBX, MBY, MBX - RNG + tx, MBY - RNG + ty);
        if (s < bbest) begin bbest = s; bx = tx - RNG; by = ty - RNG; end
      end
  endtask

  initial begin
    b_prepare();
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin : arch_a
        a_load();
        a_search(0, MBX, MBY);
        a_search(1, MBX, MBY);
        a_search(2, MBX, MBY);
        a_search(1, 0, 0);
        a_search(2, 160, 128);
        a_search(3, 80, 64);
      end
      begin : arch_b
        @(negedge clk); b_rst = 1; b_en = 1;
        repeat (2) @(negedge clk);
        while (b_prog_mode) @(negedge clk);
        b_rst = 0;
        while (out_bytes.size() < 2) @(posedge clk);
        repeat (3) @(posedge clk);
        check($signed(out_bytes[0]) == bx && $signed(out_bytes[1]) == by,
              $sformatf("B MV (%0d,%0d) expected (%0d,%0d)", $signed(out_bytes[0]), $signed(out_bytes[1]), bx, by));
        check(bx == -SX && by == -SY, "B finds the planted displacement");
      end
    join
    check(n_skip > 0, "A: border candidates skipped");
    check(n_step > 0, "A: step ends");
    check(n_search_end == 6, "A: search ends");
    check(n_fill > 0 && n_reuse > 0, "A: current-MB cache filled and reused");
    check(n_switch > 0, "A: algorithm switched");
    check(n_prog >= 2048, "B: firmware upload");
    check(n_ld_overlap > 0, "B: LD overlapped with execution");
    check(n_sad_stall > 0, "B: SAD16 stalls");
    check(n_jt > 0 && n_jn > 0, "B: jumps taken and not taken");
    check(ram.wait_clocks > 0, "B: bus waits");
    check(n_toggle == 2, "B: done toggled once per MV byte");
    $display("A: %0d skips, %0d step ends, %0d searches, %0d fills, %0d reuses, %0d switches",
             n_skip, n_step, n_search_end, n_fill, n_reuse, n_switch);
    $display("B: %0d upload clocks, %0d LD overlap, %0d SAD16 stall clocks, %0d/%0d jumps, %0d bus waits, %0d toggles",
             n_prog, n_ld_overlap, n_sad_stall, n_jt, n_jn, ram.wait_clocks, n_toggle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
