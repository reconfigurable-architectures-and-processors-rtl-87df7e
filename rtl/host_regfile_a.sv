// host_regfile_a: the four 64-bit registers through which the host
// configures and controls the architecture-A estimator and reads its result.
//
// Register map (this design's choice; the original design gives only the count,
// the width and the purpose):
//   0 CTRL    [0] rst (core reset, active high)  [1] en
//             [2] go (write 1: one-clock start pulse, reads as 0)
//             [5:4] sel_pat (algorithm region of the pattern memory)
//   1 CONFIG  [15:0] frame width  [31:16] frame height
//             [47:32] MB x (pixels)  [63:48] MB y (pixels)
//   2 RESULT  read-only: [7:0] mv_x  [15:8] mv_y  [31:16] SAD  [32] done;
//             captured from the core when it signals done
//   3 PATTERN write: one pattern-memory entry, written in the same clock:
//             [9:0] entry address {sel_pat, PA}  [10] SeE  [11] StE
//             [19:12] NPA  [27:20] dx  [35:28] dy  [55:36] raster offset
// Writes take effect at the clock edge; reads are combinational.
module host_regfile_a
  import me_a_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // host side
  input  logic               wr_en,
  input  logic [1:0]         wr_addr,
  input  logic [63:0]        wr_data,
  input  logic [1:0]         rd_addr,
  output logic [63:0]        rd_data,
  // core side
  output logic               core_rst,
  output logic               en,
  output logic               go,
  output logic [SEL_W-1:0]   sel_pat,
  output logic [15:0]        frame_w,
  output logic [15:0]        frame_h,
  output logic [15:0]        mb_x,
  output logic [15:0]        mb_y,
  output logic               pm_we,
  output logic [PM_AW-1:0]   pm_waddr,
  output patt_entry_t        pm_wdata,
  input  logic signed [MV_W-1:0] mv_x,
  input  logic signed [MV_W-1:0] mv_y,
  input  logic [SAD_W-1:0]   sad,
  input  logic               done
);

  logic [63:0] ctrl, config_r, result, pattern;
  logic        done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl <= '0; config_r <= '0; result <= '0; pattern <= '0;
      go <= 1'b0; pm_we <= 1'b0; done_q <= 1'b0;
    end else begin
      go     <= 1'b0;
      pm_we  <= 1'b0;
      done_q <= done;
      if (wr_en) begin
        unique case (wr_addr)
          2'd0: begin
            ctrl <= {wr_data[63:3], 1'b0, wr_data[1:0]};
            go   <= wr_data[2];
            if (wr_data[2]) result[32] <= 1'b0;
          end
          2'd1: config_r <= wr_data;
          2'd2: ;  // read-only
          2'd3: begin
            pattern <= wr_data;
            pm_we   <= 1'b1;
          end
        endcase
      end
      if (done && !done_q)
        result <= {31'd0, 1'b1, sad, mv_y, mv_x};
    end
  end

  assign core_rst = ctrl[0];
  assign en       = ctrl[1];
  assign sel_pat  = ctrl[5:4];
  assign frame_w  = config_r[15:0];
  assign frame_h  = config_r[31:16];
  assign mb_x     = config_r[47:32];
  assign mb_y     = config_r[63:48];

  assign pm_waddr        = pattern[9:0];
  assign pm_wdata.see    = pattern[10];
  assign pm_wdata.ste    = pattern[11];
  assign pm_wdata.npa    = pattern[19:12];
  assign pm_wdata.dx     = pattern[27:20];
  assign pm_wdata.dy     = pattern[35:28];
  assign pm_wdata.raster = pattern[55:36];

  always_comb begin
    unique case (rd_addr)
      2'd0:    rd_data = ctrl;
      2'd1:    rd_data = config_r;
      2'd2:    rd_data = result;
      default: rd_data = pattern;
    endcase
  end

endmodule
