// program_memory: the ASIP firmware store, 1024 x 16 bits (2 kB).
//
// One write port, used by the firmware loader while the processor is in
// programming mode, and one synchronous read port with a read enable for
// instruction fetch: rdata takes mem[raddr] at the clock edge when re is
// high and holds otherwise, so the output register doubles as the
// instruction register and a stalled instruction stays put. Size from the
// original design; the read-enable port is this design's choice.
module program_memory
  import asip_pkg::*;
#(
  parameter int WORDS = PM_WORDS
)(
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [DW-1:0]            wdata,
  input  logic                     re,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output logic [DW-1:0]            rdata
);

  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
