// tb_hog_core: one core on a 72x136 frame (9x17 cells, 8x16 blocks, four
// 64x128 windows) fed pixel by pixel with random gaps.  Checks the HOG
// features the core produces against the floating-point reference (at most
// 5 % of features more than 3 LSB off, none more than 10: pixels whose
// angle sits exactly on a vote-split boundary may fall either way), each window's result against a
// score computed here from the captured features and the loaded
// coefficients, that scanning stalled on missing rows, and the frame time.
module tb_hog_core;
  import hog_pkg::*;
  import tb_hog_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int FW = 72, FH = 136;
  logic start = 0, busy, done;
  core_cfg_t cfg_in;
  logic pix_valid = 0, pix_ready;
  logic [7:0] pix;
  logic coef_we = 0, thr_we = 0, thr_sel = 0;
  logic [6:0] coef_mac;
  logic [3:0] coef_grp, thr_stage = 0;
  logic [1:0] coef_lane;
  logic [COEF_W-1:0] coef_data;
  logic signed [ACC_W-1:0] thr_data = 0;
  logic fo_valid, xo_valid, det_valid, stall;
  feat_beat_t fo;
  logic [7:0] xo_wx;
  inter_t xo_res;
  det_t det;
  logic [31:0] mac_ops, early_cnt, win_cnt;

  hog_core #(.MAX_W(128)) dut (.clk, .rst_n, .start, .cfg_in, .busy, .done,
    .pix_valid, .pix_ready, .pix,
    .coef_we, .coef_mac, .coef_grp, .coef_lane, .coef_data,
    .thr_we, .thr_stage, .thr_sel, .thr_data,
    .feat_out_valid(fo_valid), .feat_out(fo), .feat_in_valid(1'b0), .feat_in('0),
    .ext_in_valid(1'b0), .ext_in_wx('0), .ext_in_res('0),
    .ext_out_valid(xo_valid), .ext_out_wx(xo_wx), .ext_out_res(xo_res),
    .det_valid, .det, .mac_ops, .early_cnt, .win_cnt, .stall);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("timeout: rows %0d wx %0d rdy %b val %b busy %b cy %0d beats %0d", dut.rows_done, dut.u_lb.wx, pix_ready, pix_valid, busy, dut.acy, nbeats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cap [];
  int nbeats = 0;
  always @(posedge clk) if (rst_n && fo_valid) begin
    for (int l = 0; l < 4; l++) cap[fidx(int'(fo.bx), int'(fo.by), l, int'(fo.idx))] = int'(fo.grp[l]);
    nbeats++;
  end

  det_t dets [$];
  always @(posedge clk) if (rst_n && det_valid) dets.push_back(det);
  int nstall = 0;
  always @(posedge clk) if (rst_n && stall) nstall++;

  longint tdet [14], trej [14];

  initial begin
    int t0, t1, bad;
    real worst;
    W = FW; H = FH;
    img = new[W * H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y * W + x] = int'(128.0 + 60.0 * $sin(real'(x) * 0.21 + real'(y) * 0.05)
                              + 40.0 * $cos(real'(y) * 0.17 - real'(x) * 0.09)) + $urandom_range(0, 16);
    hog_ref();
    cap = new[bwid() * bhgt() * 36];
    foreach (tdet[g]) begin tdet[g] = 0; trej[g] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 120; p++)
      for (int g = 0; g < 9; g++)
        for (int l = 0; l < 4; l++) begin
          coef[0][p][g][l] = $urandom_range(0, 4095) - 2048;
          @(negedge clk);
          coef_we = 1; coef_mac = 7'(p); coef_grp = 4'(g); coef_lane = 2'(l);
          coef_data = COEF_W'(coef[0][p][g][l]);
        end
    @(negedge clk);
    coef_we = 0;
    cfg_in = '0;
    cfg_in.width = 11'(FW); cfg_in.height = 11'(FH); cfg_in.mode = MODE_VERT; cfg_in.svm_thr = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t0 = $time;
    for (int i = 0; i < FW * FH; i++) begin
      bit ok;
      pix_valid = 1; pix = 8'(img[i]);
      do begin
        #1 ok = pix_ready;     // ready depends on registered state only
        @(negedge clk);
      end while (!ok);
      pix_valid = 0;
      if ($urandom_range(0, 9) == 0) @(negedge clk);
    end
    while (!done) @(negedge clk);
    t1 = $time;
    // features
    bad = 0;
    worst = 0.0;
    foreach (cap[i]) begin
      real d;
      d = real'(cap[i]) - feat[i];
      if (d > worst) worst = d;
      if (-d > worst) worst = -d;
      if (d > 3.0 || d < -3.0) begin
        bad++;
        if (bad < 0) $display("feature %0d (block %0d lane %0d bin %0d): %0d ref %f", i, i / 36, (i / 9) % 4, i % 9, cap[i], feat[i]);
      end
    end
    checks++;
    if (bad * 20 > cap.size() || worst > 10.0) begin failures++; $display("%0d of %0d features off", bad, cap.size()); end
    checks++;
    if (nbeats != bwid() * bhgt() * 9) begin failures++; $display("%0d beats", nbeats); end
    // windows
    checks++;
    if (dets.size() != 4) begin failures++; $display("%0d windows", dets.size()); end
    for (int w = 0; w < dets.size() && w < 4; w++) begin
      longint s;
      bit e, dc;
      s = window_score(0, 0, w % 2, w / 2, cap, bwid(), 0, tdet, trej, e, dc);
      checks++;
      if (int'(dets[w].wx) != w % 2 || int'(dets[w].wy) != w / 2 || longint'(dets[w].score) != s
          || dets[w].hit != (s > 0)) begin
        failures++; $display("window %0d: score %0d want %0d", w, dets[w].score, s);
      end
    end
    checks++;
    if (nstall == 0) begin failures++; $display("scanning never stalled"); end
    // about one pixel per cycle: the frame must end within 1.25 cycles per pixel
    // (feeding has 10 % gaps) plus the pipeline drain
    checks++;
    if ((t1 - t0) / 10 > FW * FH * 5 / 4 + 2000) begin failures++; $display("frame took %0d cycles", (t1 - t0) / 10); end
    $display("frame %0dx%0d: %0d cycles, %0d stall cycles, %0d features off by >3 LSB, worst %f",
             FW, FH, (t1 - t0) / 10, nstall, bad, worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
