// me_a_pkg: types and constants shared by the pattern-driven motion estimator
// (architecture A).
//
// A search algorithm is described to the hardware as a table of pattern
// entries. Each entry names one candidate displacement (dx, dy), the same
// displacement already expressed as a raster (linear) address offset, the
// next pattern address (NPA) to use when the step ends, and two flags: StE
// (last candidate of the current search step) and SeE (last step of the
// search). The field list follows the original design; the field widths are this
// design's choice: 8-bit signed displacements (a 16x16 candidate area needs
// -8..+7, and the example tables use up to +/-9), an 8-bit NPA (256 entries
// per algorithm) and a 20-bit raster offset matching the 20-bit pixel address.
package me_a_pkg;

  localparam int PIX_W     = 8;    // bits per luminance sample
  localparam int ADDR_W    = 20;   // pixel address width of a frame memory
  localparam int MV_W      = 8;    // signed motion-vector component
  localparam int SAD_W     = 16;   // 16x16x255 fits in 16 bits
  localparam int NPA_W     = 8;    // pattern address inside one algorithm region
  localparam int SEL_W     = 2;    // algorithm select (sel_pat) bits
  localparam int PM_AW     = SEL_W + NPA_W;
  localparam int MB_SIZE   = 16;   // macroblock side in pixels
  localparam int LANES     = 8;    // absolute differences per clock
  localparam int WORD_W    = LANES * PIX_W;
  localparam int SCAN_LEN  = MB_SIZE * MB_SIZE / LANES;  // 32 cycles per MB
  localparam int IDX_W     = $clog2(SCAN_LEN);

  typedef struct packed {
    logic                     see;     // search end
    logic                     ste;     // step end
    logic [NPA_W-1:0]         npa;     // next pattern address
    logic signed [MV_W-1:0]   dx;
    logic signed [MV_W-1:0]   dy;
    logic [ADDR_W-1:0]        raster;  // dy*frame_width + dx, two's complement
  } patt_entry_t;

  localparam int ENTRY_W = $bits(patt_entry_t);

  // Search decision unit states (seven, as in the original design; only "load",
  // "running" and "last" are named there).
  typedef enum logic [2:0] {
    S_IDLE = 3'd0,  // waiting for go
    S_LOAD = 3'd1,  // ld_patt: PA <= NPA, counters cleared, MV outputs updated
    S_RUN  = 3'd2,  // scanning candidates of the current step
    S_SKIP = 3'd3,  // two dead cycles for a candidate outside the frame
    S_LAST = 3'd4,  // step end reached, waiting for the last SAD
    S_STEP = 3'd5,  // accumulate best displacement, re-centre the search
    S_DONE = 3'd6   // search ended, results held
  } sdu_state_t;

endpackage
