// hog_accel_top: dual-core HOG feature extraction and SVM classification
// accelerator.
//
// Two identical cores share one CPU interface and one memory interface.  The
// cores are cross-connected in two ways: each core's HOG features are offered
// to the other core's feature multiplexer (feature sharing: one core extracts,
// both classify, e.g. two object classes with different coefficients), and
// each core's intermediate classification result is offered to the other
// core's SVM module (a 128x128-pixel square window classified by core 0 for
// its upper 8 block rows and by core 1 for the lower 7).  For parallel
// extraction of one frame each core gets its own part of the frame (for
// HDTV, 992 and 984 pixel wide strips overlapping by 56 pixels) and the cores
// run independently.
//
// Interfaces: 32-bit CPU bus (see hog_cpu_if for the register map), 32-bit
// pixel write port from the memory bus with a core mask (see hog_mem_if),
// done pulses per core.  The partition into cores, the interfaces and the
// cross-connections follow the published block diagram; bus protocols are
// this design's own.
module hog_accel_top
  import hog_pkg::*;
#(
  parameter int MAX_W = 1920
) (
  input  logic        clk,
  input  logic        rst_n,
  // CPU bus
  input  logic        cpu_we,
  input  logic        cpu_re,
  input  logic [19:0] cpu_addr,
  input  logic [31:0] cpu_wdata,
  output logic [31:0] cpu_rdata,
  output logic        cpu_rvalid,
  // memory bus (image load)
  input  logic        mem_we,
  input  logic [1:0]  mem_core,
  input  logic [31:0] mem_wdata,
  output logic        mem_ready,
  // status
  output logic [1:0]  irq_done,
  output logic [1:0]  stall
);
  core_cfg_t  cfg [2];
  logic [1:0] start, coef_we, thr_we, busy, done, det_valid;
  logic [6:0] coef_mac;
  logic [3:0] coef_grp, thr_stage;
  logic [1:0] coef_lane;
  logic [COEF_W-1:0] coef_data;
  logic       thr_sel;
  logic signed [ACC_W-1:0] thr_data;
  det_t        det [2];
  logic [31:0] mac_ops [2];
  logic [31:0] early_cnt [2];
  logic [31:0] win_cnt [2];

  hog_cpu_if u_cpu (
    .clk, .rst_n, .cpu_we, .cpu_re, .cpu_addr, .cpu_wdata, .cpu_rdata, .cpu_rvalid,
    .cfg, .start, .coef_we, .coef_mac, .coef_grp, .coef_lane, .coef_data,
    .thr_we, .thr_stage, .thr_sel, .thr_data,
    .busy, .done, .det_valid, .det, .mac_ops, .early_cnt, .win_cnt
  );

  logic [1:0]       pix_valid, pix_ready;
  logic [PIX_W-1:0] pix [2];

  hog_mem_if u_mem (
    .clk, .rst_n, .mem_we, .mem_core, .mem_wdata, .mem_ready,
    .pix_valid, .pix_ready, .pix
  );

  logic       f_valid [2];
  feat_beat_t f_beat  [2];
  logic       x_valid [2];
  logic [7:0] x_wx    [2];
  inter_t     x_res   [2];

  for (genvar k = 0; k < 2; k++) begin : g_core
    hog_core #(.MAX_W(MAX_W)) u_core (
      .clk, .rst_n, .start(start[k]), .cfg_in(cfg[k]), .busy(busy[k]), .done(done[k]),
      .pix_valid(pix_valid[k]), .pix_ready(pix_ready[k]), .pix(pix[k]),
      .coef_we(coef_we[k]), .coef_mac, .coef_grp, .coef_lane, .coef_data,
      .thr_we(thr_we[k]), .thr_stage, .thr_sel, .thr_data,
      .feat_out_valid(f_valid[k]), .feat_out(f_beat[k]),
      .feat_in_valid(f_valid[1-k]), .feat_in(f_beat[1-k]),
      .ext_in_valid(x_valid[1-k]), .ext_in_wx(x_wx[1-k]), .ext_in_res(x_res[1-k]),
      .ext_out_valid(x_valid[k]), .ext_out_wx(x_wx[k]), .ext_out_res(x_res[k]),
      .det_valid(det_valid[k]), .det(det[k]),
      .mac_ops(mac_ops[k]), .early_cnt(early_cnt[k]), .win_cnt(win_cnt[k]),
      .stall(stall[k])
    );
  end

  assign irq_done = done;

endmodule
