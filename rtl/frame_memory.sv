// frame_memory: one frame store of architecture A (used twice: the reference
// frame holding the current macroblock, and the search frame holding the
// previously coded image).
//
// The host fills it with 64-bit words (eight pixels, pixel 0 in bits 7:0)
// through a plain write port, which is where a DMA engine would connect.
// The SAD unit needs eight horizontally adjacent pixels starting at any
// pixel address, since candidate macroblocks are not aligned to eight. The
// memory is therefore split into eight byte-wide banks, pixel p living in
// bank p mod 8, row p div 8; a read at address a fetches from every bank the
// row that holds one of the pixels a..a+7 and rotates the result so that
// pixel a comes out in bits 7:0. Read latency is one clock (registered
// outputs, as in a block RAM). Eight pixels per clock follow the original
// design; the 20-bit address (1 MB, the memory space of the programmable
// processor) and the banking are this design's choices (the original puts
// the alignment in the SAD unit).
module frame_memory
  import me_a_pkg::*;
#(
  parameter int AW = ADDR_W                 // pixel address width
)(
  input  logic                 clk,
  input  logic                 we,
  input  logic [AW-4:0]        waddr,       // 64-bit word address
  input  logic [WORD_W-1:0]    wdata,
  input  logic [AW-1:0]        raddr,       // pixel address
  output logic [WORD_W-1:0]    rdata
);

  localparam int ROWS = 2**(AW-3);

  logic [PIX_W-1:0] q     [LANES];
  logic [2:0]       rot_q;

  for (genvar b = 0; b < LANES; b++) begin : g_bank
    logic [PIX_W-1:0] bank [ROWS];
    logic [2:0]       k;
    logic [AW-1:0]    pix;

    assign k   = 3'(b) - raddr[2:0];
    assign pix = raddr + AW'(k);

    always_ff @(posedge clk) begin
      if (we) bank[waddr] <= wdata[b*PIX_W +: PIX_W];
      q[b] <= bank[pix[AW-1:3]];
    end
  end

  always_ff @(posedge clk) rot_q <= raddr[2:0];

  always_comb begin
    for (int k = 0; k < LANES; k++)
      rdata[k*PIX_W +: PIX_W] = q[3'(k) + rot_q];
  end

endmodule
