// mb_pattern_scan: walks the pixels of one 16x16 macroblock, one group of
// LANES (8) horizontally adjacent pixels per clock.
//
// The scan visits line 0 columns 0..7, line 0 columns 8..15, line 1, ... so a
// macroblock takes 16*16/8 = 32 clocks, the rate the original design gives for the
// SAD unit. 'offset' is the raster offset of the current group from the
// macroblock's top-left pixel (line * frame_w + column); it is added to the
// candidate and current macroblock base addresses by the AGU. The line offset
// is kept in a running register (one adder, no multiplier). 'clear' (the
// ld_patt pulse or the end of a candidate) restarts the scan; 'advance' steps
// it. 'last' marks the final group of the macroblock. mb_lin and mb_col are the
// counters the original design shows going to the search decision unit.
module mb_pattern_scan
  import me_a_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               advance,
  input  logic [15:0]        frame_w,
  output logic [3:0]         mb_lin,
  output logic               mb_col,
  output logic [IDX_W-1:0]   idx,      // group index 0..31 (cache address)
  output logic [ADDR_W-1:0]  offset,
  output logic               last
);

  logic [ADDR_W-1:0] line_off;

  assign last   = (mb_lin == 4'(MB_SIZE-1)) && mb_col;
  assign idx    = {mb_lin, mb_col};
  assign offset = line_off + (mb_col ? ADDR_W'(LANES) : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mb_lin   <= '0;
      mb_col   <= 1'b0;
      line_off <= '0;
    end else if (clear || (advance && last)) begin
      mb_lin   <= '0;
      mb_col   <= 1'b0;
      line_off <= '0;
    end else if (advance) begin
      mb_col <= ~mb_col;
      if (mb_col) begin
        mb_lin   <= mb_lin + 1'b1;
        line_off <= line_off + ADDR_W'(frame_w);
      end
    end
  end

endmodule
