// me_core_a: the pattern-driven motion estimator core (architecture A).
//
// Three units: the AGU (pattern memory and address generation), the SAD
// unit (eight absolute differences per clock, current-MB cache) and the
// search decision unit (comparator, MV accumulator, validity check, FSM).
// The two frame memories sit outside the core: it drives their read
// addresses and takes their 64-bit words one clock later.
//
// Operation: after go, the search runs the pattern selected by sel_pat
// starting at its entry 0, scanning each valid candidate in 32 clocks,
// until an entry flagged SeE completes. done then rises and mv_x, mv_y and
// sad hold the motion vector (relative to the macroblock at mb_x, mb_y)
// and its SAD. The partitioning follows the original design's block structure.
module me_core_a
  import me_a_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               go,
  input  logic [SEL_W-1:0]   sel_pat,
  input  logic [15:0]        frame_w,
  input  logic [15:0]        frame_h,
  input  logic [15:0]        mb_x,
  input  logic [15:0]        mb_y,
  // pattern memory write port
  input  logic               pm_we,
  input  logic [PM_AW-1:0]   pm_waddr,
  input  patt_entry_t        pm_wdata,
  // frame memory read ports
  output logic [ADDR_W-1:0]  ref_raddr,
  input  logic [WORD_W-1:0]  mb_pixel,
  output logic [ADDR_W-1:0]  sa_raddr,
  input  logic [WORD_W-1:0]  sa_pixel,
  // results
  output logic signed [MV_W-1:0] mv_x,
  output logic signed [MV_W-1:0] mv_y,
  output logic [SAD_W-1:0]   sad,
  output logic               done,
  output sdu_state_t         state
);

  patt_entry_t        entry;
  logic [NPA_W-1:0]   pa, npa;
  logic [3:0]         mb_lin;
  logic               mb_col, scan_last, ld_patt, inc_patt, scan_advance;
  logic [IDX_W-1:0]   scan_idx;
  logic [ADDR_W-1:0]  step_base_addr, mb_addr;
  logic               sadu_valid, sadu_first, sadu_last, sadu_fill;
  logic [SAD_W-1:0]   cand_sad;
  logic               cand_sad_valid;

  agu_a u_agu (
    .clk, .rst_n, .pm_we, .pm_waddr, .pm_wdata, .sel_pat,
    .ld_patt, .inc_patt, .npa, .step_base_addr, .mb_addr, .scan_advance, .frame_w,
    .entry, .pa, .mb_lin, .mb_col, .scan_last, .scan_idx,
    .pixel_addr(sa_raddr), .mb_pixel_addr(ref_raddr)
  );

  sadu_a u_sadu (
    .clk, .rst_n, .in_valid(sadu_valid), .first(sadu_first), .last(sadu_last),
    .fill(sadu_fill), .idx(scan_idx), .mb_word(mb_pixel), .sa_word(sa_pixel),
    .sad(cand_sad), .sad_valid(cand_sad_valid)
  );

  sdu u_sdu (
    .clk, .rst_n, .en, .go, .frame_w, .frame_h, .mb_x, .mb_y,
    .entry, .scan_last, .scan_idx, .sad(cand_sad), .sad_valid(cand_sad_valid),
    .ld_patt, .inc_patt, .npa, .step_base_addr, .mb_addr, .scan_advance,
    .sadu_valid, .sadu_first, .sadu_last, .sadu_fill,
    .mv_x, .mv_y, .sad_out(sad), .done, .state
  );

endmodule
