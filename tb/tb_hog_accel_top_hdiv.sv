// tb_hog_accel_top_hdiv: the accelerator at its default size on a 1920x1080
// frame divided horizontally: core 0 takes rows 0..599 and core 1 rows
// 480..1079 (two 1920x600 frames overlapping by 120 rows, so that windows
// crossing the middle are seen by one core).  The rows are sent as two
// interleaved raster streams.  Vertically long 64x128 windows.
// Checks: each core classifies 233x60 windows (together the 120 window rows
// of the frame); every window result of core 1 against a score computed
// here from its features and coefficients; core 1's features against the
// floating-point reference (same bounds as the vertical-division test); and
// the frame time, reported and bounded by 1.4 cycles per pixel of a core's
// part.  Horizontal division gives each core more pixels (1,152,000) than
// vertical division (at most 1,071,360), so it is expected to be slower.
module tb_hog_accel_top_hdiv;
  import hog_pkg::*;
  import tb_hog_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int FW = 1920, FH = 1080;
  localparam int H0 = 600, Y1 = 480;

  logic        cpu_we = 0, cpu_re = 0, cpu_rvalid, mem_we = 0, mem_ready;
  logic [19:0] cpu_addr = '0;
  logic [31:0] cpu_wdata = '0, cpu_rdata, mem_wdata = '0;
  logic [1:0]  mem_core = '0, irq_done, stall;

  hog_accel_top dut (.clk, .rst_n,
    .cpu_we, .cpu_re, .cpu_addr, .cpu_wdata, .cpu_rdata, .cpu_rvalid,
    .mem_we, .mem_core, .mem_wdata, .mem_ready, .irq_done, .stall);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cap1 [];
  always @(posedge clk) if (rst_n && dut.g_core[1].u_core.feat_out_valid) begin
    feat_beat_t b;
    b = dut.g_core[1].u_core.feat_out;
    for (int l = 0; l < 4; l++) cap1[fidx(int'(b.bx), int'(b.by), l, int'(b.idx))] = int'(b.grp[l]);
  end
  det_t dets [$];  // every window of core 1, hit or not
  always @(posedge clk) if (rst_n && dut.g_core[1].u_core.det_valid) dets.push_back(dut.g_core[1].u_core.det);
  logic [1:0] done_seen = '0;
  always @(posedge clk) done_seen <= done_seen | irq_done;

  task automatic cpu_wr(input int core, input int addr, input int data);
    @(negedge clk);
    cpu_we = 1; cpu_addr = 20'(addr) | (20'(core) << 19); cpu_wdata = 32'(data);
    @(negedge clk);
    cpu_we = 0;
  endtask

  task automatic cpu_rd(input int core, input int addr, output logic [31:0] d);
    @(negedge clk);
    cpu_re = 1; cpu_addr = 20'(addr) | (20'(core) << 19);
    @(negedge clk);
    cpu_re = 0;
    d = cpu_rdata;
  endtask

  int gimg [];

  longint tdet [14], trej [14];

  initial begin
    logic [31:0] r;
    int t0, t1, bad, big, cyc;
    real worst;
    foreach (tdet[g]) begin tdet[g] = 0; trej[g] = 0; end
    gimg = new[FW * FH];
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++)
        gimg[y * FW + x] = int'(128.0 + 60.0 * $sin(real'(x) * 0.13 + real'(y) * 0.05)
                               + 40.0 * $cos(real'(y) * 0.11 - real'(x) * 0.07)) + $urandom_range(0, 16);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2; k++) begin
      for (int p = 0; p < 120; p++)
        for (int g = 0; g < 9; g++)
          for (int l = 0; l < 4; l++) begin
            coef[k][p][g][l] = $urandom_range(0, 4095) - 2048;
            cpu_wr(k, (1 << 18) | (p << 8) | (g << 4) | (l << 2), coef[k][p][g][l] & 'hfff);
          end
      cpu_wr(k, 'h008, int'(MODE_VERT));
      cpu_wr(k, 'h00C, 0);
    end
    cpu_wr(0, 'h004, FW | (H0 << 16));
    cpu_wr(1, 'h004, FW | (H0 << 16));
    W = FW; H = H0;
    cap1 = new[bwid() * bhgt() * 36];
    cpu_wr(0, 'h000, 1);
    cpu_wr(1, 'h000, 1);
    t0 = $time;
    // the two parts are sent as two raster streams, word by word in turn
    @(negedge clk);
    for (int i = 0; i < H0 * FW / 4; i++)
      for (int k = 0; k < 2; k++) begin
        int x, y;
        bit ok;
        y = i / (FW / 4) + ((k == 0) ? 0 : Y1);
        x = 4 * (i % (FW / 4));
        mem_we = 1;
        mem_core = 2'(1 << k);
        for (int j = 0; j < 4; j++) mem_wdata[8*j +: 8] = 8'(gimg[y * FW + x + j]);
        do begin
          #1 ok = mem_ready;
          @(negedge clk);
        end while (!ok);
      end
    mem_we = 0;
    while (done_seen != 2'b11) @(negedge clk);
    t1 = $time;
    cyc = (t1 - t0) / 10;
    // window counts
    cpu_rd(0, 'h020, r);
    checks++;
    if (r != 233 * 60) begin failures++; $display("core 0: %0d windows", r); end
    cpu_rd(1, 'h020, r);
    checks++;
    if (r != 233 * 60) begin failures++; $display("core 1: %0d windows", r); end
    // frame time
    checks++;
    if (cyc > FW * H0 * 14 / 10) begin failures++; $display("frame took %0d cycles", cyc); end
    // features of core 1's part
    img = new[W * H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) img[y * W + x] = gimg[(y + Y1) * FW + x];
    hog_ref();
    bad = 0; big = 0; worst = 0.0;
    foreach (feat[i]) begin
      real dd;
      dd = real'(cap1[i]) - feat[i];
      if (dd < 0.0) dd = -dd;
      if (dd > worst) worst = dd;
      if (dd > 3.0) bad++;
      if (dd > 10.0) big++;
    end
    checks++;
    if (bad * 20 > feat.size() || big * 1000 > feat.size() || worst > 32.0) begin
      failures++; $display("%0d of %0d features off, worst %f", bad, feat.size(), worst);
    end
    // every window of core 1
    checks++;
    if (dets.size() != 233 * 60) begin failures++; $display("%0d windows seen", dets.size()); end
    for (int i = 0; i < dets.size(); i++) begin
      longint s;
      bit e, dc;
      s = window_score(0, 1, int'(dets[i].wx), int'(dets[i].wy), cap1, bwid(), 0, tdet, trej, e, dc);
      checks++;
      if (longint'(dets[i].score) != s || dets[i].hit != (s > 0)) begin
        failures++;
        if (failures < 10) $display("window (%0d,%0d): %0d want %0d", dets[i].wx, dets[i].wy, dets[i].score, s);
      end
    end
    $display("HDTV frame, horizontal division: %0d cycles, %0d windows checked on core 1, %0d features >3 LSB off, %0d >10, worst %f",
             cyc, dets.size(), bad, big, worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
