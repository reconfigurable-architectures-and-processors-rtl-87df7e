// sadu_b: SAD16 unit of the ASIP (architecture B).
//
// Computes the sum of absolute differences between one 16-pixel line of the
// current macroblock and one 16-pixel line of a candidate block, and adds it
// to an accumulator value supplied by the instruction (the old Rd). P pixel
// pairs are processed per clock, so a SAD16 takes 16/P clocks: P = 1 is the
// serial structure the original design uses in its prototype (16 clocks per line,
// 256 per macroblock); P = 16 is the fully parallel one-clock structure it
// mentions as the other end of the trade-off.
//
// Operands (this design's choice of how the line coordinates are held):
//   cand   = {cy, cx}: search-area coordinates of the candidate line's first
//            pixel (bytes of a 16-bit register)
//   origin = {ty, tx}: search-area coordinates of the candidate block's
//            top-left pixel; the current-MB line is cy - ty.
// The caller increments cy through the ALU when the instruction completes.
//
// Timing: 'active' is held for the whole instruction. The scratchpads are
// read asynchronously, so the partial sum of the addressed pixels is formed
// in the same clock. In the clock where 'last' is high, 'result' holds the
// finished value and the counter returns to zero.
module sadu_b
  import asip_pkg::*;
#(
  parameter int P = 1
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              active,
  input  logic [DW-1:0]     acc_in,
  input  logic [DW-1:0]     cand,
  input  logic [DW-1:0]     origin,
  output logic [7:0]        mb_raddr,
  input  logic [8*P-1:0]    mb_rdata,
  output logic [9:0]        sa_raddr,
  input  logic [8*P-1:0]    sa_rdata,
  output logic [DW-1:0]     result,
  output logic              last
);

  localparam int N = MB_N / P;
  localparam int CW = (N > 1) ? $clog2(N) : 1;

  logic [CW-1:0] cnt;
  logic [DW-1:0] acc_r, base;
  logic [DW-1:0] partial;
  logic [3:0]    mb_line;
  logic [4:0]    col;

  assign col      = 5'(cnt) * 5'(P);
  assign mb_line  = 4'(cand[15:8] - origin[15:8]);
  assign mb_raddr = {mb_line, col[3:0]};
  assign sa_raddr = {cand[12:8], 5'd0} + {5'd0, cand[4:0]} + {5'd0, col};

  always_comb begin
    partial = '0;
    for (int k = 0; k < P; k++) begin
      logic [7:0] a, b;
      a = mb_rdata[8*k +: 8];
      b = sa_rdata[8*k +: 8];
      partial = partial + {8'd0, (a > b) ? (a - b) : (b - a)};
    end
  end

  assign last   = active && (32'(cnt) == N - 1);
  assign base   = (cnt == '0) ? acc_in : acc_r;
  assign result = base + partial;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      acc_r <= '0;
    end else if (active) begin
      if (last) cnt <= '0;
      else begin
        cnt   <= cnt + 1'b1;
        acc_r <= result;
      end
    end
  end

endmodule
