// tb_asip_control: checks the fetch/decode/branch unit of the ASIP. A
// synchronous program memory is modelled in the testbench and filled with
// random instructions, a quarter of them jumps with random conditions and
// targets. With random stalls and random flag updates, every executed
// instruction must be the one a reference program counter expects; taken
// jumps must redirect it, and conditional jumps must follow the flags
// (always, negative, zero, positive).
// Expected values are computed in the testbench, independently of the RTL;
// sizes and stimuli are this testbench's own choice.
module tb_asip_control;
  import asip_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, stall = 0, flag_we = 0, n_in = 0, z_in = 0;
  logic [PC_W-1:0] imem_addr, pc;
  logic imem_re, instr_valid, jump_taken;
  logic [DW-1:0] imem_rdata = 0;
  instr_t instr;
  logic [DW-1:0] prog [PM_WORDS];
  int checks = 0, failures = 0, taken = 0, not_taken = 0;
  int exp_pc = 0;
  bit fn = 0, fz = 0;

  asip_control dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (imem_re) imem_rdata <= prog[imem_addr];

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reference: check each executed instruction and follow the branches
  always @(posedge clk) if (rst_n && instr_valid && !stall) begin
    instr_t e;
    bit c;
    e = decode(prog[exp_pc]);
    checks++;
    if (instr != e) begin
      failures++; $display("FAIL: executed %h expected %h at %0d", instr, e, exp_pc);
    end
    c = (e.cc == CC_ALWAYS) || (e.cc == CC_NEG && fn) || (e.cc == CC_ZERO && fz) ||
        (e.cc == CC_POS && !fn && !fz);
    if (e.op == OP_J && c) begin
      exp_pc = e.addr; taken++;
      checks++;
      if (!jump_taken) begin failures++; $display("FAIL: jump not taken"); end
    end else begin
      if (e.op == OP_J) not_taken++;
      exp_pc = (exp_pc + 1) % PM_WORDS;
    end
    if (flag_we) begin fn = n_in; fz = z_in; end
  end

  initial begin
    for (int i = 0; i < PM_WORDS; i++) begin
      logic [15:0] w;
      w = 16'($urandom);
      if (i % 4 == 0) w = {3'b001, 2'($urandom), 1'b0, 10'($urandom % 64)};
      else if (w[15:13] == 3'b001) w[15:13] = 3'b110;
      prog[i] = w;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1; run = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      stall = ($urandom % 5) == 0;
      flag_we = instr_valid && ($urandom % 2); n_in = $urandom % 2; z_in = !n_in && ($urandom % 2);
    end
    checks++;
    if (taken == 0 || not_taken == 0) begin failures++; $display("FAIL: jump coverage"); end
    $display("%0d taken, %0d not taken", taken, not_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
