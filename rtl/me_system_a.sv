// me_system_a: the architecture-A co-processor as the host sees it.
//
// The host register file, the motion estimator core and its two frame
// memories: the reference frame memory holds the frame being coded (the
// current macroblock is read from it), the search frame memory holds the
// previously coded frame the candidates come from. The host writes both
// memories with 64-bit words (fm_sel 0: reference, 1: search), the path a
// DMA engine would use; no handshake is needed since the core only reads.
// Registers are accessed through a plain synchronous write / combinational
// read port. The core reset is the register file's rst bit or the system
// reset. Composition follows the original design's system integration.
module me_system_a
  import me_a_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // register port
  input  logic               reg_wr,
  input  logic [1:0]         reg_waddr,
  input  logic [63:0]        reg_wdata,
  input  logic [1:0]         reg_raddr,
  output logic [63:0]        reg_rdata,
  // frame memory write port (DMA side)
  input  logic               fm_we,
  input  logic               fm_sel,
  input  logic [ADDR_W-4:0]  fm_waddr,
  input  logic [WORD_W-1:0]  fm_wdata,
  output logic               done
);

  logic               core_rst, en, go, pm_we;
  logic [SEL_W-1:0]   sel_pat;
  logic [15:0]        frame_w, frame_h, mb_x, mb_y;
  logic [PM_AW-1:0]   pm_waddr;
  patt_entry_t        pm_wdata;
  logic signed [MV_W-1:0] mv_x, mv_y;
  logic [SAD_W-1:0]   sad;
  logic [ADDR_W-1:0]  ref_raddr, sa_raddr;
  logic [WORD_W-1:0]  mb_pixel, sa_pixel;
  sdu_state_t         state;
  logic               core_rst_n;

  assign core_rst_n = rst_n & ~core_rst;

  host_regfile_a u_regs (
    .clk, .rst_n,
    .wr_en(reg_wr), .wr_addr(reg_waddr), .wr_data(reg_wdata),
    .rd_addr(reg_raddr), .rd_data(reg_rdata),
    .core_rst, .en, .go, .sel_pat, .frame_w, .frame_h, .mb_x, .mb_y,
    .pm_we, .pm_waddr, .pm_wdata, .mv_x, .mv_y, .sad, .done
  );

  me_core_a u_core (
    .clk, .rst_n(core_rst_n), .en, .go, .sel_pat, .frame_w, .frame_h, .mb_x, .mb_y,
    .pm_we, .pm_waddr, .pm_wdata,
    .ref_raddr, .mb_pixel, .sa_raddr, .sa_pixel,
    .mv_x, .mv_y, .sad, .done, .state
  );

  frame_memory u_ref_mem (
    .clk, .we(fm_we && !fm_sel), .waddr(fm_waddr), .wdata(fm_wdata),
    .raddr(ref_raddr), .rdata(mb_pixel)
  );

  frame_memory u_sa_mem (
    .clk, .we(fm_we && fm_sel), .waddr(fm_waddr), .wdata(fm_wdata),
    .raddr(sa_raddr), .rdata(sa_pixel)
  );

endmodule
