// tb_asip_regfile: checks the ASIP register file (R0..R23, three
// combinational read ports, two write ports, port A winning on the same
// register) against a shadow copy under random traffic, including the
// special-purpose outputs (frame width, MB position, search range) and
// reads of the unused numbers 24..31, which return 0.
// Expected values are computed in the testbench, independently of the RTL;
// sizes and stimuli are this testbench's own choice.
module tb_asip_regfile;
  import asip_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0] ra_addr = 0, rb_addr = 0, rc_addr = 0, wa_addr = 0, wb_addr = 0;
  logic [DW-1:0] ra_data, rb_data, rc_data, wa_data = 0, wb_data = 0;
  logic wa_en = 0, wb_en = 0;
  logic [DW-1:0] frame_w, mb_x, mb_y, range_p;
  logic [DW-1:0] shadow [32];
  int checks = 0, failures = 0;

  asip_regfile dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) shadow[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      wa_en = $urandom % 2; wb_en = $urandom % 2;
      wa_addr = 5'($urandom); wb_addr = (i % 7 == 0) ? wa_addr : 5'($urandom);
      wa_data = 16'($urandom); wb_data = 16'($urandom);
      ra_addr = 5'($urandom); rb_addr = 5'($urandom); rc_addr = 5'($urandom);
      #1;
      checks++;
      if (ra_data != shadow[ra_addr] || rb_data != shadow[rb_addr] || rc_data != shadow[rc_addr] ||
          frame_w != shadow[R_FRAME_W] || mb_x != shadow[R_MB_X] || mb_y != shadow[R_MB_Y] ||
          range_p != shadow[R_RANGE]) begin
        failures++; $display("FAIL: read mismatch at step %0d", i);
      end
      if (wb_en && wb_addr < NREG) shadow[wb_addr] = wb_data;
      if (wa_en && wa_addr < NREG) shadow[wa_addr] = wa_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
