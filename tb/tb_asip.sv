// tb_asip: end-to-end test of the ME processor (architecture B).
//
// The shared memory model holds a synthetic current frame at 0x00000, the
// moved reference frame at 0x80000 and a full-search program at the
// firmware address. The test uploads the firmware in programming mode
// (rst and en high), runs it, and checks the two MV bytes that appear on
// the data port (done toggling for each) against a software full search
// with the same first-minimum rule, for an interior macroblock whose best
// match is the planted displacement. It also checks: two clocks per
// uploaded instruction, 16 clocks per serial SAD16, LD running while other
// instructions execute, taken and not-taken jumps, and bus waits.
module tb_asip;
  import asip_pkg::*;
  import asip_tb_pkg::*;
  import me_tb_pkg::*;

  localparam int W = 176, H = 144, MBX = 64, MBY = 48, RNG = 4;

  logic clk = 0, rst_n = 0, rst = 0, en = 0;
  logic [19:0] ext_addr;
  logic [7:0]  ext_data_i, ext_data_o;
  logic        ext_data_oe, ext_oe_we, ext_req, ext_gnt, done, prog_mode;

  int checks = 0, failures = 0;

  asip dut (.*);
  ext_ram_model ram (.clk, .addr(ext_addr), .data_w(ext_data_o), .data_oe(ext_data_oe),
                     .oe_we(ext_oe_we), .req(ext_req), .gnt(ext_gnt), .q(ext_data_i));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // event counters
  int sad_cycles, sad_instrs, ld_overlap, jumps_taken, jumps_not, prog_cycles;
  always @(posedge clk) if (rst_n) begin
    if (prog_mode) prog_cycles++;
    if (dut.sad_active) sad_cycles++;
    if (dut.v && dut.d.op == OP_SAD16 && dut.sad_last) sad_instrs++;
    if (dut.agu_busy && dut.v && !dut.stall && dut.d.op != OP_LD) ld_overlap++;
    if (dut.v && !dut.stall && dut.d.op == OP_J) begin
      if (dut.jump_taken) jumps_taken++; else jumps_not++;
    end
  end

  // capture output bytes
  logic [7:0] out_bytes[$];
  logic       done_q = 0;
  int         toggles = 0;
  always @(posedge clk) begin
    if (rst_n && ext_data_oe && ext_oe_we) out_bytes.push_back(ext_data_o);
    if (rst_n && done != done_q) toggles++;
    done_q = done;
  end

  initial begin
    logic [15:0] prog[$];
    int best, bx, by, n_instr;
    // memory image
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        ram.mem[y * W + x]           = 8'(cur_pix(x, y));
        ram.mem[20'h80000 + y * W + x] = 8'(ref_pix(x, y));
      end
    fsbm_program(prog, W, H, MBX, MBY, RNG);
    n_instr = prog.size();
    for (int i = 0; i < 1024; i++) begin
      logic [15:0] wd;
      wd = (i < prog.size()) ? prog[i] : i_j(0, i);
      ram.mem[20'hFF800 + 2 * i]     = wd[7:0];
      ram.mem[20'hFF800 + 2 * i + 1] = wd[15:8];
    end
    // expected: first minimum, rows outer, columns inner
    best = 1 << 30;
    for (int ty = 0; ty <= 2 * RNG; ty++)
      for (int tx = 0; tx <= 2 * RNG; tx++) begin
        int s;
        s = block_sad(MBX, MBY, MBX - RNG + tx, MBY - RNG + ty);
        if (s < best) begin best = s; bx = tx - RNG; by = ty - RNG; end
      end
    check(bx == -SX && by == -SY && best == 0, "reference search finds the planted displacement");

    repeat (3) @(posedge clk);
    rst_n = 1;
    // programming mode
    @(negedge clk); rst = 1; en = 1;
    @(negedge clk);
    check(prog_mode == 1'b1, "rst and en high enter programming mode");
    while (prog_mode) @(posedge clk);
    check(prog_cycles >= 2048, $sformatf("upload took %0d clocks, at least 2 per instruction", prog_cycles));
    for (int i = 0; i < n_instr; i++)
      if (dut.u_pm.mem[i] !== prog[i]) begin
        check(0, $sformatf("program word %0d", i));
        break;
      end
    check(dut.u_pm.mem[1023] == i_j(0, 1023), "last program word loaded little endian");
    // run
    @(negedge clk); rst = 0;
    while (out_bytes.size() < 2) @(posedge clk);
    repeat (5) @(posedge clk);
    check($signed(out_bytes[0]) == bx && $signed(out_bytes[1]) == by,
          $sformatf("MV (%0d,%0d) expected (%0d,%0d)", $signed(out_bytes[0]), $signed(out_bytes[1]), bx, by));
    check(dut.u_rf.regs[22] == 16'(best), $sformatf("SAD %0d expected %0d", dut.u_rf.regs[22], best));
    check(toggles == 2, $sformatf("done toggled %0d times, expected 2", toggles));
    check(sad_instrs == 16 * (2 * RNG + 1) ** 2, $sformatf("%0d SAD16 executed", sad_instrs));
    check(sad_cycles == 16 * sad_instrs, $sformatf("SAD16 clocks %0d, expected 16 each", sad_cycles));
    check(ld_overlap > 0, "LD runs in parallel with other instructions");
    check(jumps_taken > 0 && jumps_not > 0, "jumps taken and not taken");
    check(ram.wait_clocks > 0, "bus grant waited for");
    $display("mv (%0d,%0d) sad %0d, %0d SAD16, %0d LD-overlap clocks, %0d/%0d jumps taken/not",
             bx, by, best, sad_instrs, ld_overlap, jumps_taken, jumps_not);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
