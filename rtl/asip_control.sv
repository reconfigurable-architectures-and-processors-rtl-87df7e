// asip_control: fetch and decode of the ASIP.
//
// A two-stage machine: the program memory's registered output is the
// instruction register (fetch), and the decoded instruction executes in the
// next clock, so most instructions complete at one per clock. The PC
// increments on every fetch; a taken jump loads the PC with the immediate
// address and discards the instruction already fetched (one bubble). A
// stall from the datapath (a multi-clock SAD16, or an LD or MV output that
// must wait for its unit) freezes PC and instruction register. The negative
// and zero flags are written by ADD, SUB, DIV2 and SAD16 and tested by J.
// When run is low (reset, en low, programming mode) everything holds; a
// reset returns the PC to 0. Hardwired decoding and the PC/adder/IR
// structure follow the original design; the fetch timing is this design's choice.
module asip_control
  import asip_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic             stall,
  input  logic             flag_we,
  input  logic             n_in,
  input  logic             z_in,
  output logic [PC_W-1:0]  imem_addr,
  output logic             imem_re,
  input  logic [DW-1:0]    imem_rdata,
  output instr_t           instr,
  output logic             instr_valid,
  output logic             jump_taken,
  output logic [PC_W-1:0]  pc
);

  logic flag_n, flag_z, ir_valid, cond;

  assign instr       = decode(imem_rdata);
  assign instr_valid = ir_valid && run;

  always_comb begin
    unique case (instr.cc)
      CC_ALWAYS: cond = 1'b1;
      CC_NEG:    cond = flag_n;
      CC_ZERO:   cond = flag_z;
      default:   cond = !flag_n && !flag_z;
    endcase
  end

  assign jump_taken = instr_valid && !stall && (instr.op == OP_J) && cond;
  assign imem_re    = run && !stall;
  assign imem_addr  = pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; ir_valid <= 1'b0; flag_n <= 1'b0; flag_z <= 1'b0;
    end else if (run && !stall) begin
      if (jump_taken) begin
        pc       <= instr.addr;
        ir_valid <= 1'b0;
      end else begin
        pc       <= pc + 1'b1;
        ir_valid <= 1'b1;
      end
      if (flag_we) begin
        flag_n <= n_in;
        flag_z <= z_in;
      end
    end
  end

endmodule
