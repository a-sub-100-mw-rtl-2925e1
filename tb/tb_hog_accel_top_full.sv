// tb_hog_accel_top_full: the accelerator at its default size on one full
// 1920x1080 HDTV frame, divided vertically between the two cores: core 0
// takes columns 0..991 and core 1 columns 936..1919 (992 and 984 pixels,
// 56 columns overlapping).  The image is sent as two interleaved raster
// streams, one per strip, so the overlap is sent to each core separately.  Vertically long
// 64x128 windows, every window classified.
// Checks: each core classifies all windows of its strip (117x120 and
// 116x120, together the 233 window columns of the frame); core 0's HOG
// features against the floating-point reference (at most 5 % more than 3 LSB
// off, 0.1 % more than 10 LSB, none more than 32: on a smooth image many
// pixels share one gradient direction, and where that direction sits on a
// vote-split boundary the whole cell's share may move to the neighbouring
// bin); every core-0 window result
// against a score computed here from its features and coefficients; and
// that the frame finishes within 1.43 million cycles, the per-frame budget
// for 30 frames/s at 42.9 MHz.
module tb_hog_accel_top_full;
  import hog_pkg::*;
  import tb_hog_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int FW = 1920, FH = 1080;
  localparam int W0 = 992, X1 = 936, W1 = 984;

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

  int cap0 [];
  always @(posedge clk) if (rst_n && dut.g_core[0].u_core.feat_out_valid) begin
    feat_beat_t b;
    b = dut.g_core[0].u_core.feat_out;
    for (int l = 0; l < 4; l++) cap0[fidx(int'(b.bx), int'(b.by), l, int'(b.idx))] = int'(b.grp[l]);
  end
  det_t dets [$];  // every window of core 0, hit or not
  always @(posedge clk) if (rst_n && dut.g_core[0].u_core.det_valid) dets.push_back(dut.g_core[0].u_core.det);
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
    cpu_wr(0, 'h004, W0 | (FH << 16));
    cpu_wr(1, 'h004, W1 | (FH << 16));
    W = W0; H = FH;
    cap0 = new[bwid() * bhgt() * 36];
    cpu_wr(0, 'h000, 1);
    cpu_wr(1, 'h000, 1);
    t0 = $time;
    // the two strips are sent as two raster streams, word by word in turn
    @(negedge clk);
    for (int i = 0; i < FH * W0 / 4 || i < FH * W1 / 4; i++)
      for (int k = 0; k < 2; k++) begin
        int sw, x, y;
        bit ok;
        sw = (k == 0) ? W0 / 4 : W1 / 4;
        if (i >= FH * sw) continue;
        y = i / sw;
        x = ((k == 0) ? 0 : X1) + 4 * (i % sw);
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
    if (r != 117 * 120) begin failures++; $display("core 0: %0d windows", r); end
    cpu_rd(1, 'h020, r);
    checks++;
    if (r != 116 * 120) begin failures++; $display("core 1: %0d windows", r); end
    // frame time
    checks++;
    if (cyc > 1430000) begin failures++; $display("frame took %0d cycles", cyc); end
    // features of strip 0
    img = new[W * H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) img[y * W + x] = gimg[y * FW + x];
    hog_ref();
    bad = 0; big = 0; worst = 0.0;
    foreach (feat[i]) begin
      real dd;
      dd = real'(cap0[i]) - feat[i];
      if (dd < 0.0) dd = -dd;
      if (dd > worst) worst = dd;
      if (dd > 3.0) bad++;
      if (dd > 10.0) big++;
    end
    checks++;
    if (bad * 20 > feat.size() || big * 1000 > feat.size() || worst > 32.0) begin
      failures++; $display("%0d of %0d features off, worst %f", bad, feat.size(), worst);
    end
    // every window of core 0
    checks++;
    if (dets.size() != 117 * 120) begin failures++; $display("%0d windows seen", dets.size()); end
    for (int i = 0; i < dets.size(); i++) begin
      longint s;
      bit e, dc;
      s = window_score(0, 0, int'(dets[i].wx), int'(dets[i].wy), cap0, bwid(), 0, tdet, trej, e, dc);
      checks++;
      if (longint'(dets[i].score) != s || dets[i].hit != (s > 0)) begin
        failures++;
        if (failures < 10) $display("window (%0d,%0d): %0d want %0d", dets[i].wx, dets[i].wy, dets[i].score, s);
      end
    end
    $display("HDTV frame: %0d cycles (budget 1430000), %0d windows checked on core 0, %0d features >3 LSB off, %0d >10, worst %f",
             cyc, dets.size(), bad, big, worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
