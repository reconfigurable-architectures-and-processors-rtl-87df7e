// pattern_memory: the lookup table that describes the search algorithms of
// architecture A.
//
// The memory is divided into 2**SEL_W equal regions of 2**NPA_W entries, one
// per algorithm; sel_pat supplies the upper address bits, so switching the
// algorithm at run time only changes sel_pat. The original design gives N*N entries
// (256 for a 16x16 search area) as a worst case per algorithm; the number of
// regions is this design's choice (four: room for FSBM, 3SS, DS and one
// more). The host writes one entry per clock through the write port. The
// read port is asynchronous (a small distributed RAM), so the entry for the
// current PA is valid in the same cycle; this is this design's choice.
module pattern_memory
  import me_a_pkg::*;
#(
  parameter int AW = PM_AW
)(
  input  logic              clk,
  // host write port
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  patt_entry_t       wdata,
  // search-side read port
  input  logic [SEL_W-1:0]  sel_pat,
  input  logic [NPA_W-1:0]  pa,
  output patt_entry_t       entry
);

  patt_entry_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign entry = mem[AW'({sel_pat, pa})];

endmodule
