// tb_asip_alu: checks the ASIP ALU (ADD, SUB, DIV2 as an arithmetic shift
// right) and its negative and zero flags with corner values and random
// operands.
// Expected values are computed in the testbench, independently of the RTL;
// sizes and stimuli are this testbench's own choice.
module tb_asip_alu;
  import asip_pkg::*;
  alu_op_t op = ALU_ADD;
  logic [DW-1:0] a = 0, b = 0, y;
  logic neg, zero;
  int checks = 0, failures = 0;

  asip_alu dut (.*);

  initial begin : watchdog
    #1000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 6000; i++) begin
      logic [DW-1:0] e;
      op = alu_op_t'(i % 3);
      if (i < 30) begin
        a = (i % 5 == 0) ? 16'h0000 : (i % 5 == 1) ? 16'hFFFF : (i % 5 == 2) ? 16'h8000 : (i % 5 == 3) ? 16'h7FFF : 16'h0001;
        b = (i / 5 % 3 == 0) ? 16'h0001 : (i / 5 % 3 == 1) ? a : 16'hFFFF;
      end else begin
        a = 16'($urandom); b = 16'($urandom);
      end
      #1;
      unique case (op)
        ALU_ADD: e = a + b;
        ALU_SUB: e = a - b;
        default: e = 16'($signed(a) >>> 1);
      endcase
      checks++;
      if (y != e || neg != e[15] || zero != (e == 0)) begin
        failures++; $display("FAIL: op %0d a %h b %h: y %h expected %h", op, a, b, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
