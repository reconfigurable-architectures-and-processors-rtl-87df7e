// pattern_generator: the pattern address (PA) counter of the architecture-A
// address generation unit.
//
// PA indexes the pattern memory inside the region of the selected algorithm.
// It is loaded with the next pattern address (NPA) when the search decision
// unit pulses ld_patt at the start of a search step, and incremented when it
// pulses inc_patt after the last address of a candidate macroblock (or after
// a candidate rejected as lying outside the frame). ld_patt wins over
// inc_patt. Both actions take effect on the next clock edge; reset clears PA.
// Behaviour follows the original design; the load-over-increment priority is this
// design's choice.
module pattern_generator
  import me_a_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ld_patt,
  input  logic             inc_patt,
  input  logic [NPA_W-1:0] npa,
  output logic [NPA_W-1:0] pa
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        pa <= '0;
    else if (ld_patt)  pa <= npa;
    else if (inc_patt) pa <= pa + 1'b1;
  end

endmodule
