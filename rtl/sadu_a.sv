// sadu_a: SAD unit of architecture A.
//
// Each clock it takes eight current-macroblock pixels and eight candidate
// pixels, forms the eight absolute differences, adds them in a tree and
// accumulates the sum, so a 16x16 macroblock needs 32 clocks, as in the original design.
// The current macroblock is read from the reference frame only while the
// first candidate of a search is processed ('fill'); those words are copied
// into the 32 x 64-bit current-MB cache and every later candidate reads the
// cache instead. The candidate words are taken from the search frame memory.
//
// Interface timing: the control inputs (in_valid, first, last, fill, idx)
// are given in the cycle the AGU issues the addresses; the frame memory
// words (mb_word, sa_word) arrive one clock later, as does the cache word.
// Stage 1 registers the eight-way sum, stage 2 the accumulator; sad_valid
// pulses three clocks after the 'last' address with the complete SAD. The
// original unit is described as a deeper (32-stage) pipeline; this design
// uses the two stages above, which keeps the same 32-clock throughput.
module sadu_a
  import me_a_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               first,
  input  logic               last,
  input  logic               fill,
  input  logic [IDX_W-1:0]   idx,
  input  logic [WORD_W-1:0]  mb_word,
  input  logic [WORD_W-1:0]  sa_word,
  output logic [SAD_W-1:0]   sad,
  output logic               sad_valid
);

  // control aligned with the memory data
  logic             v1, first1, last1, fill1;
  logic [IDX_W-1:0] idx1;
  logic [WORD_W-1:0] cache [SCAN_LEN];
  logic [WORD_W-1:0] cache_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; first1 <= 1'b0; last1 <= 1'b0; fill1 <= 1'b0; idx1 <= '0;
    end else begin
      v1 <= in_valid; first1 <= first; last1 <= last; fill1 <= fill; idx1 <= idx;
    end
  end

  always_ff @(posedge clk) begin
    cache_q <= cache[idx];
    if (v1 && fill1) cache[idx1] <= mb_word;
  end

  // eight absolute differences and their sum
  logic [WORD_W-1:0] cur;
  logic [11:0]       sum8;
  assign cur = fill1 ? mb_word : cache_q;

  always_comb begin
    sum8 = '0;
    for (int k = 0; k < LANES; k++) begin
      logic [PIX_W-1:0] a, b;
      a = cur[k*PIX_W +: PIX_W];
      b = sa_word[k*PIX_W +: PIX_W];
      sum8 = sum8 + {4'd0, (a > b) ? (a - b) : (b - a)};
    end
  end

  // stage 1: registered sum; stage 2: accumulator
  logic        v2, first2, last2;
  logic [11:0] sum_r;
  logic [SAD_W-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; first2 <= 1'b0; last2 <= 1'b0; sum_r <= '0;
      acc <= '0; sad <= '0; sad_valid <= 1'b0;
    end else begin
      v2 <= v1; first2 <= first1; last2 <= last1; sum_r <= sum8;
      sad_valid <= 1'b0;
      if (v2) begin
        acc <= (first2 ? '0 : acc) + SAD_W'(sum_r);
        if (last2) begin
          sad       <= (first2 ? '0 : acc) + SAD_W'(sum_r);
          sad_valid <= 1'b1;
        end
      end
    end
  end

endmodule
