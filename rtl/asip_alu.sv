// asip_alu: the ASIP arithmetic unit.
//
// One adder whose second operand passes through an XOR stage, so the same
// adder subtracts (b inverted, carry in 1), plus an arithmetic shift right
// by one for DIV2. Results are 16-bit two's complement; 'neg' is the sign
// bit of the result and 'zero' flags an all-zero result. These are the two
// flags the jump instruction tests. Purely combinational. The XOR-adder and
// shift structure follow the original design.
module asip_alu
  import asip_pkg::*;
(
  input  alu_op_t         op,
  input  logic [DW-1:0]   a,
  input  logic [DW-1:0]   b,
  output logic [DW-1:0]   y,
  output logic            neg,
  output logic            zero
);

  logic          sub;
  logic [DW-1:0] b_x, sum;

  assign sub = (op == ALU_SUB);
  assign b_x = b ^ {DW{sub}};
  assign sum = a + b_x + DW'(sub);

  always_comb begin
    unique case (op)
      ALU_DIV2: y = {a[DW-1], a[DW-1:1]};
      default:  y = sum;
    endcase
  end

  assign neg  = y[DW-1];
  assign zero = (y == '0);

endmodule
