// agu_a: address generation unit of architecture A.
//
// Holds the pattern generator (PA counter), the pattern memory and the MB
// pattern scan. The current pattern entry's raster displacement (step_displ)
// is added to the step base address held by the search decision unit; the
// sum is the top-left pixel address of the candidate macroblock. The scan
// offset is then added to it, giving one search-frame address per clock
// (pixel_addr). The same offset added to the current macroblock address
// gives the reference (current) frame address used while the current MB is
// copied into the SAD unit's cache. The structure follows the original design's
// block diagram; the separate current-MB address output is this design's
// choice (the original design only says the reference frame is read the first time).
//
// Timing: the entry read is asynchronous, so a PA change is visible in the
// same cycle; addresses are combinational from registered state and are
// meant to be registered by the synchronous frame memories.
module agu_a
  import me_a_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // host write port of the pattern memory
  input  logic              pm_we,
  input  logic [PM_AW-1:0]  pm_waddr,
  input  patt_entry_t       pm_wdata,
  // algorithm select
  input  logic [SEL_W-1:0]  sel_pat,
  // control from the search decision unit
  input  logic              ld_patt,
  input  logic              inc_patt,
  input  logic [NPA_W-1:0]  npa,
  input  logic [ADDR_W-1:0] step_base_addr,
  input  logic [ADDR_W-1:0] mb_addr,
  input  logic              scan_advance,
  input  logic [15:0]       frame_w,
  // to the search decision unit
  output patt_entry_t       entry,
  output logic [NPA_W-1:0]  pa,
  output logic [3:0]        mb_lin,
  output logic              mb_col,
  output logic              scan_last,
  output logic [IDX_W-1:0]  scan_idx,
  // to the frame memories
  output logic [ADDR_W-1:0] pixel_addr,
  output logic [ADDR_W-1:0] mb_pixel_addr
);

  logic [ADDR_W-1:0] offset;
  logic [ADDR_W-1:0] cand_base;

  pattern_generator u_pgen (
    .clk, .rst_n, .ld_patt, .inc_patt, .npa, .pa
  );

  pattern_memory u_pmem (
    .clk, .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata),
    .sel_pat, .pa, .entry
  );

  mb_pattern_scan u_scan (
    .clk, .rst_n,
    .clear(ld_patt || inc_patt), .advance(scan_advance), .frame_w,
    .mb_lin, .mb_col, .idx(scan_idx), .offset, .last(scan_last)
  );

  assign cand_base     = step_base_addr + entry.raster;
  assign pixel_addr    = cand_base + offset;
  assign mb_pixel_addr = mb_addr + offset;

endmodule
