// sdu: search decision unit of architecture A.
//
// It works on three levels, as the original design describes:
//  1. Motion-vector bookkeeping. It holds the accumulated MV of the finished
//     steps, the step base address (raster address of the current search
//     centre), and, for the best candidate of the running step, its SAD,
//     displacement, raster displacement and next pattern address. When a SAD
//     arrives it is compared with the smallest one so far; a smaller or equal
//     value replaces it together with the candidate's data.
//  2. Validity. A candidate whose macroblock would leave the frame
//     (x < 0, y < 0, x+16 > width, y+16 > height) is not scanned; the pattern
//     address advances after two dead clocks.
//  3. Control, a seven-state FSM: IDLE -> LOAD (ld_patt, MV outputs take the
//     accumulated MV) -> RUN (one address per clock, 32 per candidate,
//     candidates back to back) -> LAST when a candidate flagged StE (or SeE)
//     has been scanned, waiting for its SAD -> STEP (the best displacement is
//     added to the MV and to the base address, the best candidate's NPA
//     becomes the next pattern address) -> LOAD again, or DONE when SeE.
//     If no candidate of the step improved on the smallest SAD (the centre
//     carried over from the previous step is still best), the NPA of the
//     step's last entry is used instead, so a pattern that does not
//     re-visit its centre cannot loop back to the previous step.
//
// Choices of this design where the original description is silent or ambiguous: the
// smallest SAD is kept across steps (so a step whose pattern omits the
// centre still compares against it) and ties replace the stored best, as in
// the original design's minimum rule (a candidate replaces the best when its SAD is less than or equal); the best displacement is cleared at each
// step end; SeE ends the search after the step-end work of that candidate; go
// is accepted only while en is high. States SKIP, STEP, IDLE and DONE are
// named here; the original design only names load, running and last.
module sdu
  import me_a_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              go,
  input  logic [15:0]       frame_w,
  input  logic [15:0]       frame_h,
  input  logic [15:0]       mb_x,
  input  logic [15:0]       mb_y,
  // from the AGU
  input  patt_entry_t       entry,
  input  logic              scan_last,
  input  logic [IDX_W-1:0]  scan_idx,
  // from the SAD unit
  input  logic [SAD_W-1:0]  sad,
  input  logic              sad_valid,
  // to the AGU
  output logic              ld_patt,
  output logic              inc_patt,
  output logic [NPA_W-1:0]  npa,
  output logic [ADDR_W-1:0] step_base_addr,
  output logic [ADDR_W-1:0] mb_addr,
  output logic              scan_advance,
  // to the SAD unit
  output logic              sadu_valid,
  output logic              sadu_first,
  output logic              sadu_last,
  output logic              sadu_fill,
  // results
  output logic signed [MV_W-1:0] mv_x,
  output logic signed [MV_W-1:0] mv_y,
  output logic [SAD_W-1:0]  sad_out,
  output logic              done,
  output sdu_state_t        state
);

  logic signed [MV_W-1:0] acc_x, acc_y;
  logic signed [MV_W-1:0] best_dx, best_dy, pend_dx, pend_dy;
  logic [ADDR_W-1:0]      best_raster, pend_raster;
  logic [NPA_W-1:0]       best_npa, pend_npa;
  logic [SAD_W-1:0]       min_sad;
  logic [NPA_W-1:0]       end_npa, npa_r;
  logic                   pend_v, fill_r, end_see, skip_cnt, improved;

  // ---- candidate validity (frame borders) ----
  logic signed [17:0] cx, cy;
  logic               cand_ok, step_end;
  assign cx = $signed({2'b00, mb_x}) + 18'(acc_x) + 18'(entry.dx);
  assign cy = $signed({2'b00, mb_y}) + 18'(acc_y) + 18'(entry.dy);
  assign cand_ok = (cx >= 0) && (cy >= 0) &&
                   (cx + 18'sd16 <= $signed({2'b00, frame_w})) &&
                   (cy + 18'sd16 <= $signed({2'b00, frame_h}));
  assign step_end = entry.ste | entry.see;

  logic [ADDR_W-1:0] mb_addr_calc;
  assign mb_addr_calc = ADDR_W'(32'(mb_y) * 32'(frame_w) + 32'(mb_x));

  // ---- control outputs ----
  always_comb begin
    ld_patt      = 1'b0;
    inc_patt     = 1'b0;
    scan_advance = 1'b0;
    sadu_valid   = 1'b0;
    unique case (state)
      S_LOAD: ld_patt = 1'b1;
      S_RUN: if (cand_ok) begin
        scan_advance = 1'b1;
        sadu_valid   = 1'b1;
        if (scan_last && !step_end) inc_patt = 1'b1;
      end
      S_SKIP: if (skip_cnt && !step_end) inc_patt = 1'b1;
      default: ;
    endcase
  end

  assign sadu_first = (scan_idx == '0);
  assign sadu_last  = scan_last;
  assign sadu_fill  = fill_r;
  assign npa        = npa_r;
  assign sad_out    = min_sad;

  // ---- state and registers ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      acc_x <= '0; acc_y <= '0; mv_x <= '0; mv_y <= '0;
      best_dx <= '0; best_dy <= '0; best_raster <= '0; best_npa <= '0;
      pend_dx <= '0; pend_dy <= '0; pend_raster <= '0; pend_npa <= '0;
      min_sad <= '1; pend_v <= 1'b0; fill_r <= 1'b0; end_see <= 1'b0;
      skip_cnt <= 1'b0; step_base_addr <= '0; mb_addr <= '0; done <= 1'b0;
      end_npa <= '0; npa_r <= '0; improved <= 1'b0;
    end else begin
      // level 1: compare an arriving SAD with the smallest one
      if (sad_valid && pend_v) begin
        pend_v <= 1'b0;
        if (sad <= min_sad) begin
          min_sad     <= sad;
          best_dx     <= pend_dx;
          best_dy     <= pend_dy;
          best_raster <= pend_raster;
          best_npa    <= pend_npa;
          improved    <= 1'b1;
        end
      end

      unique case (state)
        S_IDLE, S_DONE: if (go && en) begin
          acc_x <= '0; acc_y <= '0;
          best_dx <= '0; best_dy <= '0; best_raster <= '0; best_npa <= '0;
          min_sad <= '1; pend_v <= 1'b0; fill_r <= 1'b1; done <= 1'b0;
          npa_r <= '0; improved <= 1'b0;
          mb_addr        <= mb_addr_calc;
          step_base_addr <= mb_addr_calc;
          state          <= S_LOAD;
        end
        S_LOAD: begin
          mv_x  <= acc_x;
          mv_y  <= acc_y;
          state <= S_RUN;
        end
        S_RUN: begin
          if (!cand_ok) begin
            skip_cnt <= 1'b0;
            state    <= S_SKIP;
          end else if (scan_last) begin
            pend_v      <= 1'b1;
            pend_dx     <= entry.dx;
            pend_dy     <= entry.dy;
            pend_raster <= entry.raster;
            pend_npa    <= entry.npa;
            fill_r      <= 1'b0;
            if (step_end) begin
              end_see <= entry.see;
              end_npa <= entry.npa;
              state   <= S_LAST;
            end
          end
        end
        S_SKIP: begin
          skip_cnt <= 1'b1;
          if (skip_cnt) begin
            if (step_end) begin
              end_see <= entry.see;
              end_npa <= entry.npa;
              state   <= S_LAST;
            end else begin
              state <= S_RUN;
            end
          end
        end
        S_LAST: if (!pend_v) state <= S_STEP;
        S_STEP: begin
          acc_x          <= acc_x + best_dx;
          acc_y          <= acc_y + best_dy;
          step_base_addr <= step_base_addr + best_raster;
          best_dx <= '0; best_dy <= '0; best_raster <= '0;
          npa_r    <= improved ? best_npa : end_npa;
          improved <= 1'b0;
          if (end_see) begin
            mv_x  <= acc_x + best_dx;
            mv_y  <= acc_y + best_dy;
            done  <= 1'b1;
            state <= S_DONE;
          end else begin
            state <= S_LOAD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A candidate's SAD must be consumed before the next one is scanned out.
  assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_RUN && scan_last && cand_ok) |-> !pend_v || sad_valid);

endmodule
