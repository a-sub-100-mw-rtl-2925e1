// hog_core: one HOG feature extraction core.
//
// Pixels stream into the cell line buffer; the address generator scans the
// frame cell by cell; each pixel's gradient goes through the CORDIC unit into
// the cell histogram; finished cells go to the SRAM for intermediate cell
// histograms, which hands out 2x2-cell blocks; the normaliser turns each
// block into 36 HOG features (9 beats of four), and the SVM classification
// module classifies all detection windows simultaneously, one block at a
// time, writing one result per window.  A multiplexer in front of the SVM
// module selects this core's features or the other core's (feature sharing);
// this core's features are always offered to the other core.  With external
// features selected, the extraction path is not started (it stays idle).
//
// Timing: one pixel per cycle when the line buffer has the rows a cell needs;
// the path after the address generator has no back-pressure.  A block's
// features leave the normaliser 35 cycles after its last cell, its window
// results two cycles after the last feature beat.
module hog_core
  import hog_pkg::*;
#(
  parameter int MAX_W = 1920,
  parameter int LB_ROWS = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  core_cfg_t               cfg_in,
  output logic                    busy,
  output logic                    done,
  // pixels
  input  logic                    pix_valid,
  output logic                    pix_ready,
  input  logic [PIX_W-1:0]        pix,
  // coefficient / threshold loading
  input  logic                    coef_we,
  input  logic [6:0]              coef_mac,
  input  logic [3:0]              coef_grp,
  input  logic [1:0]              coef_lane,
  input  logic [COEF_W-1:0]       coef_data,
  input  logic                    thr_we,
  input  logic [3:0]              thr_stage,
  input  logic                    thr_sel,
  input  logic signed [ACC_W-1:0] thr_data,
  // HOG features to / from the other core
  output logic                    feat_out_valid,
  output feat_beat_t              feat_out,
  input  logic                    feat_in_valid,
  input  feat_beat_t              feat_in,
  // intermediate classification result to / from the other core
  input  logic                    ext_in_valid,
  input  logic [7:0]              ext_in_wx,
  input  inter_t                  ext_in_res,
  output logic                    ext_out_valid,
  output logic [7:0]              ext_out_wx,
  output inter_t                  ext_out_res,
  // results
  output logic                    det_valid,
  output det_t                    det,
  output logic [31:0]             mac_ops,
  output logic [31:0]             early_cnt,
  output logic [31:0]             win_cnt,
  output logic                    stall      // scanning waits for image rows
);
  localparam int MAX_CW = MAX_W / CELL;

  core_cfg_t  cfg;
  logic [7:0] bw, bh;
  logic       x_start, x_on;
  logic       svm_valid;
  feat_beat_t svm_beat;

  hog_core_ctrl u_ctrl (
    .clk, .rst_n, .start, .cfg_in,
    .f_valid(svm_valid), .f_beat(svm_beat),
    .cfg, .bw, .bh, .extract_start(x_start), .extract_on(x_on), .busy, .done
  );

  // ---------------------------------------------------------------- input
  logic [11:0] rows_done, keep_row;
  logic [10:0] ax, ay;
  logic [7:0]  acx, acy;
  logic        a_valid, a_first, a_last, a_flast, a_busy;
  logic [PIX_W-1:0] pl, pr, pu, pd;
  logic        lb_ready;

  assign pix_ready = lb_ready && x_on;

  hog_line_buffer #(.MAX_W(MAX_W), .ROWS(LB_ROWS)) u_lb (
    .clk, .rst_n, .start(x_start), .width(cfg.width), .height(cfg.height),
    .wr_valid(pix_valid && x_on), .wr_ready(lb_ready), .wr_pix(pix),
    .rows_done, .keep_row,
    .rd_x(ax), .rd_y(ay), .pix_l(pl), .pix_r(pr), .pix_u(pu), .pix_d(pd)
  );

  hog_addr_gen u_ag (
    .clk, .rst_n, .start(x_start), .width(cfg.width), .height(cfg.height),
    .rows_done, .keep_row, .valid(a_valid), .ready(1'b1),
    .x(ax), .y(ay), .cx(acx), .cy(acy),
    .cell_first(a_first), .cell_last(a_last), .frame_last(a_flast), .busy(a_busy)
  );
  assign stall = a_busy && !a_valid;

  // ---------------------------------------------------------------- gradient
  logic             g_valid;
  logic [MAG_W-1:0] g_mag;
  logic [3:0]       g_bin;
  logic [7:0]       g_frac;
  logic [17:0]      g_tag;

  hog_cordic_gradient #(.ITER(8), .TAG_W(18)) u_grad (
    .clk, .rst_n, .in_valid(a_valid),
    .pix_l(pl), .pix_r(pr), .pix_u(pu), .pix_d(pd),
    .in_tag({a_first, a_last, acx, acy}),
    .out_valid(g_valid), .mag(g_mag), .bin(g_bin), .frac(g_frac), .out_tag(g_tag)
  );

  // ---------------------------------------------------------------- cells, blocks
  logic       h_valid;
  cell_hist_t h_hist;
  logic [7:0] h_cx, h_cy;

  hog_cell_histogram u_hist (
    .clk, .rst_n, .in_valid(g_valid), .first(g_tag[17]), .last(g_tag[16]),
    .mag(g_mag), .bin(g_bin), .frac(g_frac), .cx(g_tag[15:8]), .cy(g_tag[7:0]),
    .hist_valid(h_valid), .hist(h_hist), .hist_cx(h_cx), .hist_cy(h_cy)
  );

  logic       b_valid;
  cell_hist_t b_cells [NLANE];
  logic [7:0] b_x, b_y;

  hog_block_assembler #(.MAX_CW(MAX_CW)) u_blk (
    .clk, .rst_n, .cell_valid(h_valid), .cell_in(h_hist), .cx(h_cx), .cy(h_cy),
    .blk_valid(b_valid), .blk(b_cells), .bx(b_x), .by(b_y)
  );

  logic n_busy;
  hog_normalizer u_norm (
    .clk, .rst_n, .blk_valid(b_valid), .blk(b_cells), .bx(b_x), .by(b_y),
    .busy(n_busy), .out_valid(feat_out_valid), .out_beat(feat_out)
  );

  // ---------------------------------------------------------------- feature MUX + SVM
  assign svm_valid = busy && (cfg.use_ext ? feat_in_valid : feat_out_valid);
  assign svm_beat  = cfg.use_ext ? feat_in : feat_out;

  hog_svm_classifier #(.MAX_BW(MAX_CW - 1)) u_svm (
    .clk, .rst_n, .start,
    .mode(cfg.mode), .bw, .bh, .early_en(cfg.early_en), .svm_thr(cfg.svm_thr),
    .coef_we, .coef_mac, .coef_grp, .coef_lane, .coef_data,
    .thr_we, .thr_stage, .thr_sel, .thr_data,
    .f_valid(svm_valid), .f_beat(svm_beat),
    .ext_in_valid, .ext_in_wx, .ext_in_res,
    .ext_out_valid, .ext_out_wx, .ext_out_res,
    .det_valid, .det, .mac_ops, .early_cnt, .win_cnt
  );

endmodule
