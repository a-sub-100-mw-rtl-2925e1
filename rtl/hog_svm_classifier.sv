// hog_svm_classifier: simultaneous SVM classification with a reconfigurable
// MAC array, early classification and per-window intermediate results.
//
// Cell-based processing delivers each normalised block once.  A block belongs
// to many detection windows (up to 105 for a 7x15-block window), at a
// different place in each, so every MAC of the array holds the SVM
// coefficients of one block position of the window and all MACs work on the
// same block at once.  MACs are chained into "classification cores", one per
// block row of the window: the MAC for window column c passes its sum to the
// MAC for column c+1, which adds the next block one block later, so the last
// MAC of a chain finishes one block row of one window per block.  That row sum
// is early-classified and stored in the SRAM for intermediate results; the
// next classification core picks it up at the head of its chain one block row
// later.  The last row's sum goes to the comparator with the SVM threshold.
//
// The ROWS x COLS (15 x 8) array is connected according to mode:
//   MODE_VERT    64x128 px window, 7x15 blocks: 15 cores of 7 MACs along rows
//   MODE_HORIZ   128x64 px window, 15x7 blocks: 7 cores of 15 MACs down columns
//   MODE_SQ_HEAD 128x128 px window, first 8 block rows: 8 cores of 15 MACs;
//                the 8th row sum leaves on ext_out for the other chip core
//   MODE_SQ_TAIL 128x128 px window, last 7 block rows: 7 cores of 15 MACs;
//                the head of core 0 reads what arrived on ext_in
// Coefficients are stored per physical MAC (coef_mac = row*COLS + col), 9
// words of four, so the host decides which block position each MAC serves:
// in MODE_VERT MAC (r,c) takes window block r*7+c, in the other modes MAC
// (r,c) takes block c*15+r (plus 120 for the tail core of a square window).
//
// Early classification: after block row g (g = 0..13) of a window the sum is
// compared with thr_det[g] and thr_rej[g]; once flagged, the window's MACs stop
// computing and the flag with its decision is carried to the end.
//
// Timing: one feature beat per cycle, 9 beats per block, no back-pressure.
// Row sums are stored two cycles after the last beat of a block, the final
// result (det_valid) also two cycles after it.  Intermediate memories are read
// combinationally.  The array shape, chaining, square-window split and early
// classification follow the published design; widths, the beat format and
// the coefficient addressing are this design's own.
module hog_svm_classifier
  import hog_pkg::*;
#(
  parameter int ROWS   = 15,
  parameter int COLS   = 8,
  parameter int MAX_BW = 239
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,        // new frame: clears statistics
  input  svm_mode_e               mode,
  input  logic [7:0]              bw,           // blocks per row
  input  logic [7:0]              bh,           // block rows
  input  logic                    early_en,
  input  logic signed [ACC_W-1:0] svm_thr,
  // coefficient and threshold loading
  input  logic                    coef_we,
  input  logic [6:0]              coef_mac,
  input  logic [3:0]              coef_grp,
  input  logic [1:0]              coef_lane,
  input  logic [COEF_W-1:0]       coef_data,
  input  logic                    thr_we,
  input  logic [3:0]              thr_stage,
  input  logic                    thr_sel,      // 0 detection, 1 rejection
  input  logic signed [ACC_W-1:0] thr_data,
  // features
  input  logic                    f_valid,
  input  feat_beat_t              f_beat,
  // intermediate result from / to the other core (square window)
  input  logic                    ext_in_valid,
  input  logic [7:0]              ext_in_wx,
  input  inter_t                  ext_in_res,
  output logic                    ext_out_valid,
  output logic [7:0]              ext_out_wx,
  output inter_t                  ext_out_res,
  // results
  output logic                    det_valid,
  output det_t                    det,
  output logic [31:0]             mac_ops,      // MAC beats computed this frame
  output logic [31:0]             early_cnt,    // windows classified early
  output logic [31:0]             win_cnt       // windows finished
);
  localparam int NMAC  = ROWS * COLS;
  localparam int NK    = ROWS;       // most classification cores in one mode
  localparam int SLOTS = NK + 1;     // one bank per core, plus the external one
  localparam int EXT   = NK;

  // ---------------------------------------------------------------- config
  logic       vert;
  logic [4:0] m_len, k_num, k_off, k_tot;
  logic signed [9:0] wpr, wrows;
  always_comb begin
    vert  = (mode == MODE_VERT);
    m_len = vert ? 5'd7 : 5'd15;
    k_num = vert ? 5'd15 : ((mode == MODE_SQ_HEAD) ? 5'd8 : 5'd7);
    k_off = (mode == MODE_SQ_TAIL) ? 5'd8 : 5'd0;
    k_tot = (mode == MODE_HORIZ) ? 5'd7 : 5'd15;
    wpr   = $signed({2'b0, bw}) - $signed({5'b0, m_len}) + 10'sd1;
    wrows = $signed({2'b0, bh}) - $signed({5'b0, k_tot}) + 10'sd1;
  end

  // ---------------------------------------------------------------- memories
  logic [NLANE-1:0][COEF_W-1:0] cmem [NMAC][NBINS];
  inter_t                       imem [SLOTS][MAX_BW];
  logic signed [ACC_W-1:0]      thr_det [NSTAGE];
  logic signed [ACC_W-1:0]      thr_rej [NSTAGE];

  always_ff @(posedge clk) begin
    if (coef_we) cmem[coef_mac][coef_grp][coef_lane] <= coef_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < NSTAGE; g++) begin
        thr_det[g] <= '0;
        thr_rej[g] <= '0;
      end
    end else if (thr_we && thr_stage < 4'(NSTAGE)) begin
      if (thr_sel) thr_rej[thr_stage] <= thr_data;
      else         thr_det[thr_stage] <= thr_data;
    end
  end

  // head reads: one per bank, all at the current block column
  inter_t head_rd [SLOTS];
  always_comb begin
    for (int s = 0; s < SLOTS; s++) head_rd[s] = imem[s][f_beat.bx];
  end

  // ---------------------------------------------------------------- MAC array
  inter_t mres [ROWS][COLS];
  inter_t msrc [ROWS][COLS];
  logic   men  [ROWS][COLS];
  logic   mop  [ROWS][COLS];

  always_comb begin
    for (int i = 0; i < ROWS; i++) begin
      for (int j = 0; j < COLS; j++) begin
        logic [4:0] k, c;
        logic used;
        logic signed [9:0] wx, wy;
        k    = vert ? 5'(i) : 5'(j);
        c    = vert ? 5'(j) : 5'(i);
        used = (c < m_len) && (k < k_num);
        wx   = $signed({2'b0, f_beat.bx}) - $signed({5'b0, c});
        wy   = $signed({2'b0, f_beat.by}) - $signed({5'b0, k}) - $signed({5'b0, k_off});
        men[i][j] = used && (wx >= 0) && (wx < wpr) && (wy >= 0) && (wy < wrows);
        if (c == 5'd0) begin
          if (k != 5'd0)               msrc[i][j] = head_rd[4'(k - 5'd1)];
          else if (k_off != 5'd0)      msrc[i][j] = head_rd[EXT];
          else                         msrc[i][j] = '0;   // initial value = 0
        end else begin
          msrc[i][j] = vert ? mres[i][(j > 0) ? j - 1 : 0] : mres[(i > 0) ? i - 1 : 0][j];
        end
      end
    end
  end

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    for (genvar j = 0; j < COLS; j++) begin : g_col
      hog_svm_mac u_mac (
        .clk, .rst_n,
        .beat  (f_valid),
        .first (f_beat.first),
        .en    (men[i][j]),
        .feat  (f_beat.grp),
        .coef  (cmem[i*COLS + j][f_beat.idx]),
        .src   (msrc[i][j]),
        .res   (mres[i][j]),
        .op    (mop[i][j])
      );
    end
  end

  // ---------------------------------------------------------------- chain ends
  logic        blk_done;
  logic [7:0]  bx_d, by_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk_done <= 1'b0;
      bx_d <= '0;
      by_d <= '0;
    end else begin
      blk_done <= f_valid && f_beat.last;
      if (f_valid && f_beat.last) begin
        bx_d <= f_beat.bx;
        by_d <= f_beat.by;
      end
    end
  end

  logic signed [9:0] wx_t;
  assign wx_t = $signed({2'b0, bx_d}) - $signed({5'b0, m_len}) + 10'sd1;

  inter_t tail   [NK];
  logic   t_ok   [NK];      // tail holds a finished row of a valid window
  logic   t_last [NK];      // ... and it is the window's last row
  always_comb begin
    for (int k = 0; k < NK; k++) begin
      logic signed [9:0] wy;
      tail[k]   = vert ? mres[k][6] : mres[ROWS-1][(k < COLS) ? k : 0];
      wy        = $signed({2'b0, by_d}) - 10'(k) - $signed({5'b0, k_off});
      t_ok[k]   = blk_done && (5'(k) < k_num) && (wx_t >= 0) && (wx_t < wpr)
                  && (wy >= 0) && (wy < wrows);
      t_last[k] = (5'(k) + k_off) == (k_tot - 5'd1);
    end
  end

  // early classification at the end of every classification core
  logic   ec_valid [NK];
  inter_t ec_res   [NK];
  logic   ec_fired [NK];
  for (genvar k = 0; k < NK; k++) begin : g_ec
    logic [4:0] g;
    assign g = 5'(k) + k_off;
    hog_early_classifier u_ec (
      .clk, .rst_n,
      .in_valid (t_ok[k] && !t_last[k]),
      .in_res   (tail[k]),
      .en       (early_en),
      .thr_det  ((g < 5'(NSTAGE)) ? thr_det[g[3:0]] : '0),
      .thr_rej  ((g < 5'(NSTAGE)) ? thr_rej[g[3:0]] : '0),
      .out_valid(ec_valid[k]),
      .out_res  (ec_res[k]),
      .fired    (ec_fired[k])
    );
  end

  logic [7:0] wx_w;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wx_w <= '0;
    else if (blk_done) wx_w <= 8'(wx_t);
  end

  // store row sums; the square head sends its last core's sum to the other core
  always_ff @(posedge clk) begin
    for (int k = 0; k < NK; k++) begin
      if (ec_valid[k] && !((mode == MODE_SQ_HEAD) && (5'(k) == k_num - 5'd1)))
        imem[k][wx_w] <= ec_res[k];
    end
    if (ext_in_valid) imem[EXT][ext_in_wx] <= ext_in_res;
  end

  always_comb begin
    ext_out_valid = 1'b0;
    ext_out_res   = '0;
    for (int k = 0; k < NK; k++) begin
      if (ec_valid[k] && (mode == MODE_SQ_HEAD) && (5'(k) == k_num - 5'd1)) begin
        ext_out_valid = 1'b1;
        ext_out_res   = ec_res[k];
      end
    end
  end
  assign ext_out_wx = wx_w;

  // final comparator with the SVM threshold
  logic   fin_ok;
  inter_t fin;
  logic [7:0] fin_wy;
  always_comb begin
    fin_ok = 1'b0;
    fin    = '0;
    fin_wy = '0;
    for (int k = 0; k < NK; k++) begin
      if (t_ok[k] && t_last[k]) begin
        fin_ok = 1'b1;
        fin    = tail[k];
        fin_wy = 8'(by_d - 8'(k) - 8'(k_off));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      det_valid <= 1'b0;
      det <= '0;
    end else begin
      det_valid <= fin_ok;
      if (fin_ok) begin
        det.wx    <= 8'(wx_t);
        det.wy    <= fin_wy;
        det.early <= fin.flag;
        det.hit   <= fin.flag ? fin.dec : (fin.acc > svm_thr);
        det.score <= fin.acc;
      end
    end
  end

  // ---------------------------------------------------------------- statistics
  logic [31:0] n_ops, n_early;
  always_comb begin
    n_ops = '0;
    n_early = '0;
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++) n_ops = n_ops + 32'(mop[i][j]);
    for (int k = 0; k < NK; k++) n_early = n_early + 32'(ec_fired[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mac_ops <= '0; early_cnt <= '0; win_cnt <= '0;
    end else if (start) begin
      mac_ops <= '0; early_cnt <= '0; win_cnt <= '0;
    end else begin
      mac_ops   <= mac_ops + n_ops;
      early_cnt <= early_cnt + n_early;
      win_cnt   <= win_cnt + 32'(det_valid);
    end
  end

endmodule
