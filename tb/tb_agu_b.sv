// tb_agu_b: checks the ASIP load unit (the LD instruction's engine). A
// frame pair is placed in the behavioural shared memory; LD 0 must copy the
// 16x16 current macroblock at (mb_x, mb_y) into the MB scratchpad and LD 1
// the (16+2p)x(16+2p) search area around it into the search-area
// scratchpad, waiting for the bus grant, with p clamped to 8. The
// scratchpads are read back through the SAD read ports.
// Expected values are computed in the testbench, independently of the RTL;
// sizes and stimuli are this testbench's own choice.
module tb_agu_b;
  import asip_pkg::*;
  localparam int W = 96, H = 80;
  logic clk = 0, rst_n = 0, start = 0, t = 0;
  logic [DW-1:0] frame_w = W, mb_x = 0, mb_y = 0, range_p = 0;
  logic busy, req, gnt;
  logic [EXT_AW-1:0] addr;
  logic [7:0] data_in, mb_raddr = 0, mb_rdata, sa_rdata;
  logic [9:0] sa_raddr = 0;
  int checks = 0, failures = 0;

  agu_b dut (.*);
  ext_ram_model ram (.clk, .addr, .data_w(8'd0), .data_oe(1'b0), .oe_we(1'b0),
                     .req, .gnt, .q(data_in));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic ld(bit tt);
    int clocks;
    @(negedge clk); start = 1; t = tt;
    @(negedge clk); start = 0;
    clocks = 0;
    while (busy) begin @(negedge clk); clocks++; end
  endtask

  initial begin
    for (int i = 0; i < W * H; i++) begin
      ram.mem[i] = 8'($urandom);
      ram.mem[20'h80000 + i] = 8'($urandom);
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 8; n++) begin
      int p, bad, sz;
      range_p = 16'((n == 7) ? 12 : $urandom % 9);
      p = (range_p > 8) ? 8 : range_p;
      mb_x = 16'(p + $urandom % (W - 16 - 2 * p));
      mb_y = 16'(p + $urandom % (H - 16 - 2 * p));
      ld(0);
      bad = 0;
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++) begin
          mb_raddr = 8'(y * 16 + x); #1;
          if (mb_rdata != ram.mem[(mb_y + y) * W + mb_x + x]) bad++;
        end
      checks++;
      if (bad) begin failures++; $display("FAIL: %0d MB pixels wrong", bad); end
      ld(1);
      bad = 0; sz = 16 + 2 * p;
      for (int y = 0; y < sz; y++)
        for (int x = 0; x < sz; x++) begin
          sa_raddr = 10'(y * 32 + x); #1;
          if (sa_rdata != ram.mem[20'h80000 + (mb_y - p + y) * W + mb_x - p + x]) bad++;
        end
      checks++;
      if (bad) begin failures++; $display("FAIL: %0d search-area pixels wrong (p=%0d)", bad, p); end
    end
    checks++;
    if (ram.wait_clocks == 0) begin failures++; $display("FAIL: no bus wait seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
