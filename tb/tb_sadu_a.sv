// tb_sadu_a: checks the 8-lane SAD unit of architecture A. Candidates of
// 32 word pairs are streamed in with random gaps; the first candidate fills
// the current-MB cache (fill=1) and later ones take the current block from
// the cache while the mb_word input carries junk. Each SAD must match a
// software sum and arrive 3 clocks after the last word. As from the frame
// memories, the data words arrive one clock after their control signals.
// Expected values are computed in the testbench, independently of the RTL;
// sizes and stimuli are this testbench's own choice.
module tb_sadu_a;
  import me_a_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, first = 0, last = 0, fill = 0;
  logic [IDX_W-1:0] idx = 0;
  logic [WORD_W-1:0] mb_word = 0, sa_word = 0, mb_next = 0, sa_next = 0;
  logic [SAD_W-1:0] sad;
  logic sad_valid;
  logic [WORD_W-1:0] cur [SCAN_LEN];
  int exp_q[$], lat_q[$], cyc = 0;
  int checks = 0, failures = 0;

  sadu_a dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) begin mb_word <= mb_next; sa_word <= sa_next; end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && sad_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected sad_valid"); end
    else begin
      int e, t;
      e = exp_q.pop_front(); t = lat_q.pop_front();
      if (sad != SAD_W'(e) || cyc - t != 3) begin
        failures++; $display("FAIL: sad %0d expected %0d, latency %0d", sad, e, cyc - t);
      end
    end
  end

  initial begin
    for (int g = 0; g < SCAN_LEN; g++) cur[g] = {$urandom, $urandom};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 40; c++) begin
      int s;
      s = 0;
      for (int g = 0; g < SCAN_LEN; g++) begin
        logic [63:0] r;
        r = (c % 5 == 4) ? cur[g] : {$urandom, $urandom};
        for (int k = 0; k < 8; k++) begin
          int a, b;
          a = cur[g][k*8 +: 8]; b = r[k*8 +: 8];
          s += (a > b) ? a - b : b - a;
        end
        if (($urandom % 4) == 0) begin @(negedge clk); in_valid = 0; end
        @(negedge clk);
        in_valid = 1; first = (g == 0); last = (g == SCAN_LEN - 1); fill = (c == 0);
        idx = IDX_W'(g); sa_next = r;
        mb_next = (c == 0) ? cur[g] : {$urandom, $urandom};
        if (last) begin exp_q.push_back(s); lat_q.push_back(cyc + 1); end
      end
      @(negedge clk); in_valid = 0; first = 0; last = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d SADs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
