// asip: the programmable motion-estimation processor (architecture B).
//
// A small register-register processor with eight 16-bit instructions,
// specialised for block matching: SAD16 accumulates the SAD of one
// 16-pixel line and advances the candidate line coordinates, LD copies a
// macroblock or a search area from the shared frame memory into on-chip
// scratchpads while the program keeps running, and J branches on the
// negative/zero flags of the last arithmetic or SAD16 result. Firmware is
// uploaded through the data port in programming mode (rst and en high);
// with rst low and en high the program runs from address 0. Motion vectors
// leave through the data port when the program writes the MV output
// register (R20), with done toggling for each of the two bytes.
//
// Units: asip_control (PC, IR, decode, flags), asip_regfile (R0..R23),
// asip_alu, sadu_b (SAD16, P pixels per clock, P = 1 by default: 16 clocks
// per SAD16), agu_b (LD, scratchpads), asip_io (port, loader, MV output)
// and program_memory. Interlocks are this design's choice: an LD waits for
// a previous LD and for the MV output; SAD16 waits for a running LD; an MV
// output waits for both. The rst pin is registered and resets the core
// (not the loader or the program memory).
module asip
  import asip_pkg::*;
#(
  parameter int SAD_P = 1
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rst,
  input  logic              en,
  output logic [EXT_AW-1:0] ext_addr,
  input  logic [7:0]        ext_data_i,
  output logic [7:0]        ext_data_o,
  output logic              ext_data_oe,
  output logic              ext_oe_we,
  output logic              ext_req,
  input  logic              ext_gnt,
  output logic              done,
  output logic              prog_mode
);

  logic            rst_q, core_rst_n, run;
  logic            pm_we, imem_re;
  logic [PC_W-1:0] pm_waddr, imem_addr, pc;
  logic [DW-1:0]   pm_wdata, imem_rdata;
  instr_t          d;
  logic            v, stall, jump_taken, flag_we, n_in, z_in;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rst_q <= 1'b1;
    else        rst_q <= rst;

  assign core_rst_n = rst_n && !rst_q;
  assign run        = en && !rst_q && !prog_mode;

  // ---- register file ----
  logic [4:0]    ra_addr, rb_addr, rc_addr, wa_addr, wb_addr;
  logic [DW-1:0] ra, rb, rc, wa_data, wb_data;
  logic          wa_en, wb_en;
  logic [DW-1:0] frame_w, mb_x, mb_y, range_p;

  asip_regfile u_rf (
    .clk, .rst_n(core_rst_n),
    .ra_addr, .ra_data(ra), .rb_addr, .rb_data(rb), .rc_addr, .rc_data(rc),
    .wa_en, .wa_addr, .wa_data, .wb_en, .wb_addr, .wb_data,
    .frame_w, .mb_x, .mb_y, .range_p
  );

  assign ra_addr = (d.op == OP_MOVR) ? d.rs5 : {1'b0, d.rs1};
  assign rb_addr = {1'b0, d.rs2};
  assign rc_addr = {1'b0, d.rd};

  // ---- ALU ----
  alu_op_t       alu_op;
  logic [DW-1:0] alu_b, alu_y;
  logic          alu_n, alu_z;

  always_comb begin
    unique case (d.op)
      OP_SUB:  alu_op = ALU_SUB;
      OP_DIV2: alu_op = ALU_DIV2;
      default: alu_op = ALU_ADD;
    endcase
  end
  // SAD16 borrows the adder to step the candidate line: cy + 1
  assign alu_b = (d.op == OP_SAD16) ? 16'h0100 : rb;

  asip_alu u_alu (.op(alu_op), .a(ra), .b(alu_b), .y(alu_y), .neg(alu_n), .zero(alu_z));

  // ---- SAD unit and AGU ----
  logic [7:0]         mb_raddr;
  logic [9:0]         sa_raddr;
  logic [8*SAD_P-1:0] mb_rdata, sa_rdata;
  logic [DW-1:0]      sad_result;
  logic               sad_last, sad_active;
  logic               agu_start, agu_busy, agu_req, agu_gnt;
  logic [EXT_AW-1:0]  agu_addr;
  logic               mv_start, mv_busy;

  assign sad_active = v && (d.op == OP_SAD16) && !agu_busy;

  sadu_b #(.P(SAD_P)) u_sadu (
    .clk, .rst_n(core_rst_n), .active(sad_active), .acc_in(rc), .cand(ra), .origin(rb),
    .mb_raddr, .mb_rdata, .sa_raddr, .sa_rdata, .result(sad_result), .last(sad_last)
  );

  agu_b #(.P(SAD_P)) u_agu (
    .clk, .rst_n(core_rst_n), .start(agu_start), .t(d.t),
    .frame_w, .mb_x, .mb_y, .range_p, .busy(agu_busy),
    .req(agu_req), .gnt(agu_gnt), .addr(agu_addr), .data_in(ext_data_i),
    .mb_raddr, .mb_rdata, .sa_raddr, .sa_rdata
  );

  // ---- execute ----
  logic is_mv_write, instr_valid_w;
  assign v           = instr_valid_w;
  assign is_mv_write = (d.op == OP_MOVR) && (d.rd5 == R_MV_OUT);

  always_comb begin
    stall = 1'b0;
    if (v) begin
      unique case (d.op)
        OP_LD:    stall = agu_busy || mv_busy;
        OP_SAD16: stall = !sad_last;
        OP_MOVR:  stall = is_mv_write && (mv_busy || agu_busy);
        default:  stall = 1'b0;
      endcase
    end
  end

  always_comb begin
    wa_en = 1'b0; wa_addr = {1'b0, d.rd}; wa_data = alu_y;
    wb_en = 1'b0; wb_addr = {1'b0, d.rs1}; wb_data = alu_y;
    flag_we = 1'b0; n_in = alu_n; z_in = alu_z;
    agu_start = 1'b0; mv_start = 1'b0;
    if (v && !stall) begin
      unique case (d.op)
        OP_LD:   agu_start = 1'b1;
        OP_J:    ;
        OP_MOVR: begin
          wa_en = 1'b1; wa_addr = d.rd5; wa_data = ra;
          mv_start = is_mv_write;
        end
        OP_MOVC: begin
          wa_en   = 1'b1;
          wa_data = d.t ? {d.k, rc[7:0]} : {rc[15:8], d.k};
        end
        OP_SAD16: begin
          wa_en = 1'b1; wa_data = sad_result;
          wb_en = 1'b1;                      // Rs1 <= Rs1 + 0x0100
          flag_we = 1'b1;
          n_in = sad_result[DW-1]; z_in = (sad_result == '0);
        end
        default: begin                       // ADD, SUB, DIV2
          wa_en = 1'b1; flag_we = 1'b1;
        end
      endcase
    end
  end

  // ---- control, program memory, port ----
  asip_control u_ctrl (
    .clk, .rst_n(core_rst_n), .run, .stall, .flag_we, .n_in, .z_in,
    .imem_addr, .imem_re, .imem_rdata, .instr(d), .instr_valid(instr_valid_w),
    .jump_taken, .pc
  );

  program_memory u_pm (
    .clk, .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata),
    .re(imem_re), .raddr(imem_addr), .rdata(imem_rdata)
  );

  asip_io u_io (
    .clk, .rst_n, .rst_pin(rst), .en_pin(en), .prog_mode,
    .pm_we, .pm_waddr, .pm_wdata,
    .agu_req, .agu_addr, .agu_gnt,
    .mv_start, .mv_value(ra), .mv_busy,
    .ext_addr, .ext_data_i, .ext_data_o, .ext_data_oe, .ext_oe_we,
    .ext_req, .ext_gnt, .done
  );

endmodule
