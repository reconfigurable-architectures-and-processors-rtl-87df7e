// agu_b: address generation unit of the ASIP, executing LD.
//
// Holds the two scratchpads: MB MEM (16x16 pixels of the current
// macroblock) and SA MEM (32x32 pixels of search area, row stride 32).
// LD t=0 copies the macroblock at (mb_x, mb_y) of the current frame;
// LD t=1 copies the (16+2p) x (16+2p) window at (mb_x-p, mb_y-p) of the
// reference frame (p = search range register, at most 8). External
// addresses are frame base + y*width + x, kept in a running row address so
// only the start needs a multiply. The unit raises req and, while gnt is
// high, issues one byte address per clock; each byte arrives on data_in one
// clock after its address (synchronous external RAM) and is written into
// the scratchpad. busy stays high until the last byte is written; the
// processor keeps executing other instructions meanwhile, as the original design
// describes. Frame bases and the windowing rule are this design's choices.
//
// The scratchpads have P-pixel asynchronous read ports for the SAD unit
// (consecutive addresses, wrapping inside each memory).
module agu_b
  import asip_pkg::*;
#(
  parameter int P = 1
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              t,
  input  logic [DW-1:0]     frame_w,
  input  logic [DW-1:0]     mb_x,
  input  logic [DW-1:0]     mb_y,
  input  logic [DW-1:0]     range_p,
  output logic              busy,
  // external bus
  output logic              req,
  input  logic              gnt,
  output logic [EXT_AW-1:0] addr,
  input  logic [7:0]        data_in,
  // scratchpad read ports
  input  logic [7:0]        mb_raddr,
  output logic [8*P-1:0]    mb_rdata,
  input  logic [9:0]        sa_raddr,
  output logic [8*P-1:0]    sa_rdata
);

  logic [7:0] mb_mem [MB_N*MB_N];
  logic [7:0] sa_mem [SA_N*SA_N];

  logic              issuing, tgt;
  logic [5:0]        n, row, col;
  logic [EXT_AW-1:0] row_addr;
  logic              wr_v, wr_t;
  logic [9:0]        wr_idx;

  // start-of-transfer values
  logic [4:0]        p;
  logic [DW-1:0]     x0, y0;
  logic [EXT_AW-1:0] start_addr;
  assign p  = (range_p > DW'(MAX_RANGE)) ? 5'(MAX_RANGE) : range_p[4:0];
  assign x0 = t ? mb_x - DW'(p) : mb_x;
  assign y0 = t ? mb_y - DW'(p) : mb_y;
  assign start_addr = (t ? REF_BASE : CUR_BASE) +
                      EXT_AW'(32'(y0) * 32'(frame_w) + 32'(x0));

  assign req  = issuing;
  assign addr = row_addr + EXT_AW'(col);
  assign busy = issuing || wr_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0; tgt <= 1'b0; n <= '0; row <= '0; col <= '0;
      row_addr <= '0; wr_v <= 1'b0; wr_t <= 1'b0; wr_idx <= '0;
    end else begin
      wr_v <= 1'b0;
      if (start && !busy) begin
        issuing  <= 1'b1;
        tgt      <= t;
        n        <= t ? 6'(MB_N) + 6'({p, 1'b0}) : 6'(MB_N);
        row      <= '0;
        col      <= '0;
        row_addr <= start_addr;
      end else if (issuing && gnt) begin
        wr_v   <= 1'b1;
        wr_t   <= tgt;
        wr_idx <= tgt ? {row[4:0], col[4:0]} : {2'b00, row[3:0], col[3:0]};
        if (col == n - 1'b1) begin
          col      <= '0;
          row      <= row + 1'b1;
          row_addr <= row_addr + EXT_AW'(frame_w);
          if (row == n - 1'b1) issuing <= 1'b0;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_v && !wr_t) mb_mem[wr_idx[7:0]] <= data_in;
    if (wr_v &&  wr_t) sa_mem[wr_idx]      <= data_in;
  end

  for (genvar k = 0; k < P; k++) begin : g_rd
    assign mb_rdata[8*k +: 8] = mb_mem[8'(mb_raddr + 8'(k))];
    assign sa_rdata[8*k +: 8] = sa_mem[10'(sa_raddr + 10'(k))];
  end

endmodule
