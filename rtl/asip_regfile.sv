// asip_regfile: the ASIP register file, 24 registers of 16 bits.
//
// Three asynchronous read ports (two operands plus the destination's old
// value, which MOVC and SAD16 need) and two write ports: port A for the
// instruction result, port B for the second result of SAD16 (the updated
// line coordinates). Port A wins if both write the same register. The
// special purpose registers R16..R21 that configure the address generation
// unit are also brought out directly. All registers reset to zero. The
// register count and the special registers R16..R23 come from the original design's
// micro-architecture; port counts and reset are this design's choice.
module asip_regfile
  import asip_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [4:0]      ra_addr,
  output logic [DW-1:0]   ra_data,
  input  logic [4:0]      rb_addr,
  output logic [DW-1:0]   rb_data,
  input  logic [4:0]      rc_addr,
  output logic [DW-1:0]   rc_data,
  input  logic            wa_en,
  input  logic [4:0]      wa_addr,
  input  logic [DW-1:0]   wa_data,
  input  logic            wb_en,
  input  logic [4:0]      wb_addr,
  input  logic [DW-1:0]   wb_data,
  output logic [DW-1:0]   frame_w,
  output logic [DW-1:0]   mb_x,
  output logic [DW-1:0]   mb_y,
  output logic [DW-1:0]   range_p
);

  logic [DW-1:0] regs [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else begin
      if (wb_en && 32'(wb_addr) < NREG) regs[wb_addr] <= wb_data;
      if (wa_en && 32'(wa_addr) < NREG) regs[wa_addr] <= wa_data;
    end
  end

  function automatic logic [DW-1:0] rd(input logic [4:0] a);
    return (32'(a) < NREG) ? regs[a] : '0;
  endfunction

  assign ra_data = rd(ra_addr);
  assign rb_data = rd(rb_addr);
  assign rc_data = rd(rc_addr);
  assign frame_w = regs[R_FRAME_W];
  assign mb_x    = regs[R_MB_X];
  assign mb_y    = regs[R_MB_Y];
  assign range_p = regs[R_RANGE];

endmodule
