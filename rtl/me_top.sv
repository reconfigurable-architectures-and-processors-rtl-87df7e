// me_top: the two motion-estimation co-processors side by side.
//
// Architecture A (me_system_a) runs regular search patterns described by
// tables in its pattern memory; the host reaches it through four 64-bit
// registers and a 64-bit frame-memory write port. Architecture B (asip) is
// a programmable processor that fetches pixels from a shared 1 MB memory
// through an 8-bit port with a req/gnt handshake. The two share only the
// clock and the power-on reset; each brings out its own host interface, as
// each would connect to its own host bus.
module me_top
  import me_a_pkg::*;
  import asip_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // ---- architecture A host interface ----
  input  logic              a_reg_wr,
  input  logic [1:0]        a_reg_waddr,
  input  logic [63:0]       a_reg_wdata,
  input  logic [1:0]        a_reg_raddr,
  output logic [63:0]       a_reg_rdata,
  input  logic              a_fm_we,
  input  logic              a_fm_sel,
  input  logic [me_a_pkg::ADDR_W-4:0] a_fm_waddr,
  input  logic [WORD_W-1:0] a_fm_wdata,
  output logic              a_done,
  // ---- architecture B pins ----
  input  logic              b_rst,
  input  logic              b_en,
  output logic [EXT_AW-1:0] b_addr,
  input  logic [7:0]        b_data_i,
  output logic [7:0]        b_data_o,
  output logic              b_data_oe,
  output logic              b_oe_we,
  output logic              b_req,
  input  logic              b_gnt,
  output logic              b_done,
  output logic              b_prog_mode
);

  me_system_a u_arch_a (
    .clk, .rst_n,
    .reg_wr(a_reg_wr), .reg_waddr(a_reg_waddr), .reg_wdata(a_reg_wdata),
    .reg_raddr(a_reg_raddr), .reg_rdata(a_reg_rdata),
    .fm_we(a_fm_we), .fm_sel(a_fm_sel), .fm_waddr(a_fm_waddr), .fm_wdata(a_fm_wdata),
    .done(a_done)
  );

  asip u_arch_b (
    .clk, .rst_n, .rst(b_rst), .en(b_en),
    .ext_addr(b_addr), .ext_data_i(b_data_i), .ext_data_o(b_data_o),
    .ext_data_oe(b_data_oe), .ext_oe_we(b_oe_we), .ext_req(b_req), .ext_gnt(b_gnt),
    .done(b_done), .prog_mode(b_prog_mode)
  );

endmodule
