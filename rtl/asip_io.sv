// asip_io: the ASIP's external port and its two own transfer engines.
//
// The port (addr, data in/out, #oe_we, req/gnt, done) is shared by three
// users, one at a time:
//  * the firmware loader. A high level on rst and en together enters
//    programming mode: the loader requests the bus and reads the 2048 bytes
//    of the firmware image, little endian, two bytes (two clocks) per
//    instruction, into the program memory; it leaves programming mode when
//    the last word is written. The image is read from PROG_BASE of the
//    shared memory (this design's choice of who supplies the addresses:
//    the processor drives addr, the memory returns the bytes).
//  * the AGU, which runs LD transfers (its req/addr pass straight through).
//  * the MV output. Writing the MV output register starts it: after gnt,
//    the horizontal component (bits 7:0) is driven on data for one clock
//    and the vertical one (bits 15:8) the next, done toggling with each byte, #oe_we high
//    (write) and addr at MV_ADDR, MV_ADDR+1.
// Reads use #oe_we low and return data one clock after the address. The
// processor core never starts the AGU and the MV output at the same time.
module asip_io
  import asip_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rst_pin,
  input  logic              en_pin,
  output logic              prog_mode,
  // program memory write port
  output logic              pm_we,
  output logic [PC_W-1:0]   pm_waddr,
  output logic [DW-1:0]     pm_wdata,
  // AGU
  input  logic              agu_req,
  input  logic [EXT_AW-1:0] agu_addr,
  output logic              agu_gnt,
  // MV output
  input  logic              mv_start,
  input  logic [DW-1:0]     mv_value,
  output logic              mv_busy,
  // external pins
  output logic [EXT_AW-1:0] ext_addr,
  input  logic [7:0]        ext_data_i,
  output logic [7:0]        ext_data_o,
  output logic              ext_data_oe,
  output logic              ext_oe_we,
  output logic              ext_req,
  input  logic              ext_gnt,
  output logic              done
);

  typedef enum logic [1:0] {MV_IDLE, MV_REQ, MV_X, MV_Y} mv_state_t;

  logic              prog_q;          // rst & en seen last clock
  logic [10:0]       byte_cnt;        // next byte to request
  logic              ld_issuing, ld_v;
  logic [10:0]       ld_idx;
  logic [7:0]        low_byte;
  mv_state_t         mv_state;
  logic [DW-1:0]     mv_r;

  // ---- firmware loader ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prog_q <= 1'b0; prog_mode <= 1'b0; byte_cnt <= '0; ld_issuing <= 1'b0;
      ld_v <= 1'b0; ld_idx <= '0; low_byte <= '0;
    end else begin
      prog_q <= rst_pin && en_pin;
      ld_v   <= 1'b0;
      if (rst_pin && en_pin && !prog_q && !prog_mode) begin
        prog_mode  <= 1'b1;
        ld_issuing <= 1'b1;
        byte_cnt   <= '0;
      end else if (prog_mode) begin
        if (ld_issuing && ext_gnt) begin
          ld_v     <= 1'b1;
          ld_idx   <= byte_cnt;
          byte_cnt <= byte_cnt + 1'b1;
          if (byte_cnt == 11'h7FF) ld_issuing <= 1'b0;
        end
        if (ld_v) begin
          if (!ld_idx[0]) low_byte <= ext_data_i;
          if (ld_idx == 11'h7FF) prog_mode <= 1'b0;
        end
      end
    end
  end

  assign pm_we    = ld_v && ld_idx[0];
  assign pm_waddr = ld_idx[10:1];
  assign pm_wdata = {ext_data_i, low_byte};

  // ---- MV output ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mv_state <= MV_IDLE; mv_r <= '0; done <= 1'b0;
    end else begin
      unique case (mv_state)
        MV_IDLE: if (mv_start) begin
          mv_r     <= mv_value;
          mv_state <= MV_REQ;
        end
        MV_REQ: if (ext_gnt) begin
          mv_state <= MV_X;
          done     <= ~done;
        end
        MV_X: begin
          mv_state <= MV_Y;
          done     <= ~done;
        end
        MV_Y: mv_state <= MV_IDLE;
      endcase
    end
  end

  assign mv_busy = (mv_state != MV_IDLE);

  // ---- port multiplexing ----
  always_comb begin
    ext_req     = 1'b0;
    ext_addr    = '0;
    ext_data_o  = '0;
    ext_data_oe = 1'b0;
    ext_oe_we   = 1'b0;
    agu_gnt     = 1'b0;
    if (prog_mode) begin
      ext_req  = ld_issuing;
      ext_addr = PROG_BASE + EXT_AW'(byte_cnt);
    end else if (mv_state != MV_IDLE) begin
      ext_req = 1'b1;
      if (mv_state == MV_X) begin
        ext_addr    = MV_ADDR;
        ext_data_o  = mv_r[7:0];
        ext_data_oe = 1'b1;
        ext_oe_we   = 1'b1;
      end else if (mv_state == MV_Y) begin
        ext_addr    = MV_ADDR + 1'b1;
        ext_data_o  = mv_r[15:8];
        ext_data_oe = 1'b1;
        ext_oe_we   = 1'b1;
      end
    end else begin
      ext_req  = agu_req;
      ext_addr = agu_addr;
      agu_gnt  = ext_gnt;
    end
  end

  // Only one engine may use the port at a time.
  assert property (@(posedge clk) disable iff (!rst_n)
    !(mv_start && agu_req));

endmodule
