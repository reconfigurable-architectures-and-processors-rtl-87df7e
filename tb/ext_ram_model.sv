// ext_ram_model: behavioural model of the shared external frame memory and
// its bus arbiter, for testbenches only (not synthesizable intent).
//
// 1 MB of bytes. Reads are synchronous: q shows mem[addr] one clock after
// the address. A clock with oe_we high and data_oe high writes data_w at
// addr. The arbiter answers a request after GNT_DELAY clocks plus a random
// 0..3 extra clocks, then keeps gnt high until req falls. It counts the
// clocks a requester waited for the grant.
module ext_ram_model #(
  parameter int GNT_DELAY = 1
)(
  input  logic        clk,
  input  logic [19:0] addr,
  input  logic [7:0]  data_w,
  input  logic        data_oe,
  input  logic        oe_we,
  input  logic        req,
  output logic        gnt,
  output logic [7:0]  q
);

  logic [7:0] mem [1 << 20];
  int         wait_cnt = 0;
  int         wait_clocks = 0;
  int         grants = 0;

  initial gnt = 1'b0;

  always @(posedge clk) begin
    q <= mem[addr];
    if (oe_we && data_oe) mem[addr] <= data_w;
    if (!req) begin
      gnt      <= 1'b0;
      wait_cnt <= GNT_DELAY + int'($urandom_range(0, 3));
    end else if (!gnt) begin
      wait_clocks <= wait_clocks + 1;
      if (wait_cnt == 0) begin
        gnt    <= 1'b1;
        grants <= grants + 1;
      end else wait_cnt <= wait_cnt - 1;
    end
  end

endmodule
