// tb_hog_svm_classifier: runs the SVM classification module in its three
// window shapes (vertically long, horizontally long, and square with a head
// and a tail instance chained through the external intermediate-result port)
// with random coefficients, features and early-classification thresholds.
// The reference computes every window's sum directly as a dot product over
// its blocks, applies the early classification after every block row, and is
// compared with each reported window: position, order, hit, early flag,
// score, and the number of MAC beats actually computed.
module tb_hog_svm_classifier;
  import hog_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int MBW = 24;
  localparam int ROWS = 15, COLS = 8;

  svm_mode_e mode0, mode1;
  logic [7:0] bw, bh;
  logic early_en;
  logic signed [ACC_W-1:0] svm_thr;
  logic start = 0;
  logic coef_we [2];
  logic [6:0] coef_mac;
  logic [3:0] coef_grp;
  logic [1:0] coef_lane;
  logic [COEF_W-1:0] coef_data;
  logic thr_we = 0, thr_sel;
  logic [3:0] thr_stage;
  logic signed [ACC_W-1:0] thr_data;
  logic f_valid = 0;
  feat_beat_t f_beat;
  logic xv [2];
  logic [7:0] xwx [2];
  inter_t xres [2];
  logic det_valid [2];
  det_t det [2];
  logic [31:0] mac_ops [2], early_cnt [2], win_cnt [2];

  for (genvar k = 0; k < 2; k++) begin : g_dut
    hog_svm_classifier #(.ROWS(ROWS), .COLS(COLS), .MAX_BW(MBW)) dut (
      .clk, .rst_n, .start, .mode(k == 0 ? mode0 : mode1), .bw, .bh, .early_en, .svm_thr,
      .coef_we(coef_we[k]), .coef_mac, .coef_grp, .coef_lane, .coef_data,
      .thr_we, .thr_stage, .thr_sel, .thr_data,
      .f_valid, .f_beat,
      .ext_in_valid(xv[1-k]), .ext_in_wx(xwx[1-k]), .ext_in_res(xres[1-k]),
      .ext_out_valid(xv[k]), .ext_out_wx(xwx[k]), .ext_out_res(xres[k]),
      .det_valid(det_valid[k]), .det(det[k]),
      .mac_ops(mac_ops[k]), .early_cnt(early_cnt[k]), .win_cnt(win_cnt[k]));
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int coef [2][ROWS*COLS][NBINS][NLANE];
  int feat [MBW][MBW][NLANE][NBINS];
  longint tdet [NSTAGE], trej [NSTAGE];

  // expected window results, in output order
  longint e_score [$];
  bit     e_hit [$], e_early [$];
  int     e_wx [$], e_wy [$];
  longint e_ops;

  function automatic longint block_dot(int inst, int mac, int x, int y);
    longint s = 0;
    for (int g = 0; g < NBINS; g++)
      for (int l = 0; l < NLANE; l++) s += longint'(feat[x][y][l][g]) * coef[inst][mac][g][l];
    return s;
  endfunction

  task automatic build_ref(input int m, input int mw, input int kh, input bit sq, input bit een);
    int wpr, wrows;
    e_score.delete(); e_hit.delete(); e_early.delete(); e_wx.delete(); e_wy.delete();
    e_ops = 0;
    wpr = int'(bw) - mw + 1;
    wrows = int'(bh) - kh + 1;
    for (int wy = 0; wy < wrows; wy++)
      for (int wx = 0; wx < wpr; wx++) begin
        longint s = 0;
        bit fl = 0, dc = 0;
        for (int r = 0; r < kh && !fl; r++) begin
          for (int c = 0; c < mw; c++) begin
            int inst, mac;
            if (m == 0)      begin inst = 0; mac = r * COLS + c; end
            else if (r < 8 || !sq) begin inst = 0; mac = c * COLS + r; end
            else             begin inst = 1; mac = c * COLS + (r - 8); end
            s += block_dot(inst, mac, wx + c, wy + r);
            e_ops += 9;
          end
          if (een && r < kh - 1 && (s > tdet[r] || s < trej[r])) begin
            fl = 1; dc = (s > tdet[r]);
          end
        end
        e_score.push_back(s);
        e_hit.push_back(fl ? dc : (s > longint'(svm_thr)));
        e_early.push_back(fl);
        e_wx.push_back(wx);
        e_wy.push_back(wy);
      end
  endtask

  int got = 0, out_inst = 0;
  always @(posedge clk) if (rst_n && det_valid[out_inst]) begin
    det_t d;
    d = det[out_inst];
    checks++;
    if (got >= e_score.size()) begin
      failures++; $display("extra window (%0d,%0d)", d.wx, d.wy);
    end else if (int'(d.wx) != e_wx[got] || int'(d.wy) != e_wy[got] || d.hit != e_hit[got]
                 || d.early != e_early[got] || longint'(d.score) != e_score[got]) begin
      failures++;
      $display("window %0d: got (%0d,%0d) hit %b early %b score %0d, want (%0d,%0d) %b %b %0d",
        got, d.wx, d.wy, d.hit, d.early, d.score, e_wx[got], e_wy[got], e_hit[got], e_early[got], e_score[got]);
    end
    got++;
  end
  int stray = 0;
  always @(posedge clk) if (rst_n && det_valid[1 - out_inst]) stray++;

  task automatic load_coefs();
    for (int k = 0; k < 2; k++)
      for (int p = 0; p < ROWS * COLS; p++)
        for (int g = 0; g < NBINS; g++)
          for (int l = 0; l < NLANE; l++) begin
            coef[k][p][g][l] = $urandom_range(0, 4095) - 2048;
            @(negedge clk);
            coef_we[k] = 1; coef_we[1-k] = 0;
            coef_mac = 7'(p); coef_grp = 4'(g); coef_lane = 2'(l); coef_data = COEF_W'(coef[k][p][g][l]);
          end
    @(negedge clk);
    coef_we[0] = 0; coef_we[1] = 0;
  endtask

  task automatic load_thr(input bit tight);
    for (int g = 0; g < NSTAGE; g++) begin
      real sd;
      sd = 1.1e6 * $sqrt(real'((g + 1) * 7));
      tdet[g] = longint'((tight ? 1.0 : 2.0) * sd);
      trej[g] = -longint'((tight ? 1.0 : 2.0) * sd);
      for (int s = 0; s < 2; s++) begin
        @(negedge clk);
        thr_we = 1; thr_stage = 4'(g); thr_sel = s[0]; thr_data = ACC_W'(s ? trej[g] : tdet[g]);
      end
    end
    @(negedge clk);
    thr_we = 0;
  endtask

  task automatic run(input int m, input bit een, input int gap);
    int mw, kh, n;
    bit sq;
    sq = (m == 2);
    mw = (m == 0) ? 7 : 15;
    kh = (m == 1) ? 7 : 15;
    mode0 = (m == 0) ? MODE_VERT : (m == 1) ? MODE_HORIZ : MODE_SQ_HEAD;
    mode1 = sq ? MODE_SQ_TAIL : mode0;
    out_inst = sq ? 1 : 0;
    early_en = een;
    bw = 8'(mw + 2);
    bh = 8'(kh + 2);
    for (int x = 0; x < MBW; x++)
      for (int y = 0; y < MBW; y++)
        for (int l = 0; l < NLANE; l++)
          for (int g = 0; g < NBINS; g++) feat[x][y][l][g] = $urandom_range(0, 255);
    build_ref(m, mw, kh, sq, een);
    got = 0; stray = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int y = 0; y < int'(bh); y++)
      for (int x = 0; x < int'(bw); x++) begin
        for (int g = 0; g < NBINS; g++) begin
          @(negedge clk);
          f_valid = 1;
          for (int l = 0; l < NLANE; l++) f_beat.grp[l] = 8'(feat[x][y][l][g]);
          f_beat.idx = 4'(g); f_beat.first = (g == 0); f_beat.last = (g == NBINS - 1);
          f_beat.bx = 8'(x); f_beat.by = 8'(y);
        end
        @(negedge clk);
        f_valid = 0;
        repeat (gap) @(negedge clk);
      end
    repeat (5) @(negedge clk);
    checks++;
    if (got != e_score.size()) begin failures++; $display("mode %0d: %0d windows, want %0d", m, got, e_score.size()); end
    checks++;
    n = int'(mac_ops[0]) + (sq ? int'(mac_ops[1]) : 0);
    if (longint'(n) != e_ops) begin failures++; $display("mode %0d: mac ops %0d want %0d", m, n, e_ops); end
    checks++;
    if (!sq && stray != 0 && mode1 != mode0) failures++;
    $display("mode %0d early %0d: %0d windows, %0d early-classified, %0d MAC beats", m, een, got,
             early_cnt[0] + (sq ? early_cnt[1] : 0), n);
  endtask

  initial begin
    coef_we[0] = 0; coef_we[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    svm_thr = 0;
    load_coefs();
    load_thr(0);
    run(0, 0, 0);
    run(0, 1, 2);
    run(1, 0, 1);
    run(1, 1, 0);
    run(2, 0, 3);
    load_thr(1);
    run(2, 1, 0);
    run(0, 1, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
