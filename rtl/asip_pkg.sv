// asip_pkg: instruction set and register map of the motion-estimation ASIP
// (architecture B).
//
// Eight instructions in a fixed 16-bit format, opcode in bits 15:13 (opcode
// values and field order as in the original instruction set):
//   000 LD    t=[12]                      load MB (t=0) or search area (t=1)
//   001 J     cc=[12:11] address=[9:0]    cc: 00 always, 01 negative,
//                                         10 zero, 11 positive (>0)
//   010 MOVR  Rd=[12:8] Rs=[4:0]          Rd <= Rs (any register, SPRs too)
//   011 MOVC  t=[12] Rd=[11:8] k=[7:0]    t=1: Rd[15:8] <= k, t=0: Rd[7:0] <= k
//   100 SAD16 Rd=[11:8] Rs1=[7:4] Rs2=[3:0]
//   101 DIV2  Rd=[11:8] Rs=[7:4]          Rd <= Rs >>> 1
//   110 ADD   Rd=[11:8] Rs1=[7:4] Rs2=[3:0]
//   111 SUB   Rd=[11:8] Rs1=[7:4] Rs2=[3:0]
// Exact bit positions, the cc code points and the SPR map below are this
// design's reading of a table whose columns are only partly legible: the
// widths follow from 16 bits, a 10-bit address for the 1024-word program
// memory, 5-bit register fields in MOVR and 4-bit ones where three
// operands must fit.
//
// Registers: R0..R23 of 16 bits. R0..R15 are general purpose (reachable by
// every instruction); R16..R23 are the eight special purpose registers,
// reached through MOVR:
//   R16 frame width   R17 frame height   R18 MB x   R19 MB y
//   R20 MV output: writing it (MOVR) sends [7:0] (mv_x) then [15:8] (mv_y)
//       on the data port, toggling done for each byte
//   R21 search range p: LD t=1 loads the (16+2p) x (16+2p) area whose
//       top-left pixel is (MB x - p, MB y - p); p <= 8
//   R22, R23 free for software
package asip_pkg;

  localparam int DW       = 16;
  localparam int NREG     = 24;
  localparam int PM_WORDS = 1024;              // 2 kB of 16-bit instructions
  localparam int PC_W     = $clog2(PM_WORDS);
  localparam int EXT_AW   = 20;                // 1 MB external address space
  localparam int MB_N     = 16;                // macroblock side
  localparam int SA_N     = 32;                // search-area memory side
  localparam int MAX_RANGE = (SA_N - MB_N) / 2;

  localparam logic [EXT_AW-1:0] CUR_BASE  = 20'h00000;  // current frame
  localparam logic [EXT_AW-1:0] REF_BASE  = 20'h80000;  // reference frame
  localparam logic [EXT_AW-1:0] PROG_BASE = 20'hFF800;  // firmware image
  localparam logic [EXT_AW-1:0] MV_ADDR   = 20'hFF7FE;  // MV output bytes

  localparam logic [4:0] R_FRAME_W = 5'd16;
  localparam logic [4:0] R_FRAME_H = 5'd17;
  localparam logic [4:0] R_MB_X    = 5'd18;
  localparam logic [4:0] R_MB_Y    = 5'd19;
  localparam logic [4:0] R_MV_OUT  = 5'd20;
  localparam logic [4:0] R_RANGE   = 5'd21;

  typedef enum logic [2:0] {
    OP_LD    = 3'b000,
    OP_J     = 3'b001,
    OP_MOVR  = 3'b010,
    OP_MOVC  = 3'b011,
    OP_SAD16 = 3'b100,
    OP_DIV2  = 3'b101,
    OP_ADD   = 3'b110,
    OP_SUB   = 3'b111
  } opcode_t;

  typedef enum logic [1:0] {
    CC_ALWAYS = 2'b00,
    CC_NEG    = 2'b01,
    CC_ZERO   = 2'b10,
    CC_POS    = 2'b11
  } cond_t;

  typedef enum logic [1:0] {
    ALU_ADD  = 2'd0,
    ALU_SUB  = 2'd1,
    ALU_DIV2 = 2'd2
  } alu_op_t;

  // Decoded instruction fields
  typedef struct packed {
    opcode_t          op;
    logic             t;
    cond_t            cc;
    logic [4:0]       rd5;      // MOVR destination
    logic [4:0]       rs5;      // MOVR source
    logic [3:0]       rd;       // 4-bit destination
    logic [3:0]       rs1;
    logic [3:0]       rs2;
    logic [7:0]       k;
    logic [PC_W-1:0]  addr;
  } instr_t;

  function automatic instr_t decode(input logic [DW-1:0] w);
    instr_t d;
    d.op   = opcode_t'(w[15:13]);
    d.t    = w[12];
    d.cc   = cond_t'(w[12:11]);
    d.rd5  = w[12:8];
    d.rs5  = w[4:0];
    d.rd   = w[11:8];
    d.rs1  = w[7:4];
    d.rs2  = w[3:0];
    d.k    = w[7:0];
    d.addr = w[PC_W-1:0];
    return d;
  endfunction

endpackage
