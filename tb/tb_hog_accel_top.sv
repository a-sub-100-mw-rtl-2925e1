// tb_hog_accel_top: end-to-end test of the dual-core accelerator through its
// CPU bus and memory bus only (features are observed, never driven).
//
// A 136x136 synthetic frame is processed in three back-to-back runs, each one
// a different use of the two cores, with mode registers rewritten between
// runs:
//   1. parallel extraction of a vertically divided frame: core 0 takes
//      columns 0..95, core 1 columns 40..135 (56 columns overlap, loaded
//      once with both mask bits); vertically long windows, early
//      classification on core 0; features of both strips are checked against
//      the floating-point reference and every window result read over the
//      CPU bus is checked against a score computed here.
//   2. feature sharing: core 0 extracts and classifies vertically long
//      windows, core 1 takes core 0's features and classifies horizontally
//      long windows with its own coefficients.  Core 0's results are drained
//      while it runs; core 1 reports every window and is not drained, so its
//      16-entry result FIFO overflows and drops 4 of 20 results.
//   3. square window: core 0 classifies the upper 8 block rows, core 1 the
//      lower 7, with core 0's features and intermediate result.
// Mechanism counters (scan stall, early classification, feature sharing,
// square mode, FIFO overflow, mode switch) must each be non-zero at the end.
// Bus timing: drives at the falling edge, samples ready just before the
// rising edge.
module tb_hog_accel_top;
  import hog_pkg::*;
  import tb_hog_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int FW = 136, FH = 136;
  localparam int S0 = 0, S1 = 40, SW = 96;   // strip origins and width

  logic        cpu_we = 0, cpu_re = 0, cpu_rvalid, mem_we = 0, mem_ready;
  logic [19:0] cpu_addr = '0;
  logic [31:0] cpu_wdata = '0, cpu_rdata, mem_wdata = '0;
  logic [1:0]  mem_core = '0, irq_done, stall;

  hog_accel_top #(.MAX_W(256)) dut (.clk, .rst_n,
    .cpu_we, .cpu_re, .cpu_addr, .cpu_wdata, .cpu_rdata, .cpu_rvalid,
    .mem_we, .mem_core, .mem_wdata, .mem_ready, .irq_done, .stall);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ observation
  int cap0 [], cap1 [];
  always @(posedge clk) if (rst_n) begin
    if (dut.g_core[0].u_core.feat_out_valid) begin
      feat_beat_t b;
      b = dut.g_core[0].u_core.feat_out;
      for (int l = 0; l < 4; l++) cap0[fidx(int'(b.bx), int'(b.by), l, int'(b.idx))] = int'(b.grp[l]);
    end
    if (dut.g_core[1].u_core.feat_out_valid) begin
      feat_beat_t b;
      b = dut.g_core[1].u_core.feat_out;
      for (int l = 0; l < 4; l++) cap1[fidx(int'(b.bx), int'(b.by), l, int'(b.idx))] = int'(b.grp[l]);
    end
  end
  int n_stall = 0;
  always @(posedge clk) if (rst_n && stall != 2'b00) n_stall++;
  logic [1:0] done_seen = '0;
  always @(posedge clk) done_seen <= done_seen | irq_done;

  int n_early = 0, n_share = 0, n_square = 0, n_drop = 0, n_switch = 0;

  // ------------------------------------------------------------ bus tasks
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
    if (!cpu_rvalid) begin failures++; $display("read without rvalid"); end
    d = cpu_rdata;
  endtask

  logic [31:0] mode_reg [2] = '{32'hffff_ffff, 32'hffff_ffff};
  task automatic set_mode(input int core, input int m);
    if (mode_reg[core] != 32'hffff_ffff && mode_reg[core] != 32'(m)) n_switch++;
    mode_reg[core] = 32'(m);
    cpu_wr(core, 'h008, m);
  endtask

  // one frame through the memory bus; word-column ranges per core
  int gimg [];
  task automatic dma_frame(input int c0lo, input int c0hi, input int c1lo, input int c1hi);
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x += 4) begin
        logic [1:0] m;
        bit ok;
        m[0] = (x >= c0lo && x < c0hi);
        m[1] = (x >= c1lo && x < c1hi);
        if (m == 2'b00) continue;
        @(negedge clk);
        mem_we = 1; mem_core = m;
        for (int i = 0; i < 4; i++) mem_wdata[8*i +: 8] = 8'(gimg[y * FW + x + i]);
        do begin
          #1 ok = mem_ready;
          @(negedge clk);
        end while (!ok);
        mem_we = 0;
        if ($urandom_range(0, 7) == 0) @(negedge clk);
      end
  endtask

  // reads the head result of one core; returns 0 when the FIFO is empty
  task automatic pop(input int core, output bit got, output det_t d);
    logic [31:0] r, s;
    cpu_rd(core, 'h014, s);
    cpu_rd(core, 'h010, r);
    got = r[31];
    d.wx = r[7:0]; d.wy = r[15:8]; d.hit = r[16]; d.early = r[17]; d.score = s;
  endtask

  longint tdet [14], trej [14];
  // compares one result with the reference score
  task automatic check_det(input det_t d, input int shape, input int csel, ref int cap [],
                           input int bw, input bit een, input longint thr, input string tag);
    longint s;
    bit e, dc, hit;
    s = window_score(shape, csel, int'(d.wx), int'(d.wy), cap, bw, een, tdet, trej, e, dc);
    hit = e ? dc : (s > thr);
    checks++;
    if (longint'(d.score) != s || d.early != e || d.hit != hit) begin
      failures++;
      $display("%s window (%0d,%0d): score %0d early %b hit %b, want %0d %b %b",
               tag, d.wx, d.wy, d.score, d.early, d.hit, s, e, hit);
    end
  endtask

  // features of one strip against the reference
  task automatic check_strip(input int x0, ref int cap [], input string tag);
    int bad;
    real worst;
    W = SW; H = FH;
    img = new[W * H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) img[y * W + x] = gimg[y * FW + x0 + x];
    hog_ref();
    bad = 0; worst = 0.0;
    foreach (feat[i]) begin
      real dd;
      dd = real'(cap[i]) - feat[i];
      if (dd < 0.0) dd = -dd;
      if (dd > worst) worst = dd;
      if (dd > 3.0) bad++;
    end
    checks++;
    if (bad * 20 > feat.size() || worst > 10.0) begin
      failures++; $display("%s: %0d of %0d features off, worst %f", tag, bad, feat.size(), worst);
    end
  endtask

  task automatic wait_done(input logic [1:0] which);
    while ((done_seen & which) != which) @(negedge clk);
  endtask

  task automatic start_core(input int core);
    @(negedge clk); done_seen[core] = 1'b0;
    cpu_wr(core, 'h000, 1);
  endtask

  initial begin
    logic [31:0] r;
    bit got;
    det_t d;
    int bw, n;
    gimg = new[FW * FH];
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++)
        gimg[y * FW + x] = int'(128.0 + 60.0 * $sin(real'(x) * 0.19 + real'(y) * 0.07)
                               + 40.0 * $cos(real'(y) * 0.15 - real'(x) * 0.11)) + $urandom_range(0, 16);
    foreach (tdet[g]) begin tdet[g] = 64'sh7fff_ffff; trej[g] = -64'sh8000_0000; end
    tdet[3] = 1500000; trej[3] = -300000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // coefficients and thresholds
    for (int k = 0; k < 2; k++) begin
      for (int p = 0; p < 120; p++)
        for (int g = 0; g < 9; g++)
          for (int l = 0; l < 4; l++) begin
            coef[k][p][g][l] = $urandom_range(0, 4095) - 2048;
            cpu_wr(k, (1 << 18) | (p << 8) | (g << 4) | (l << 2), coef[k][p][g][l] & 'hfff);
          end
      for (int g = 0; g < 14; g++) begin
        cpu_wr(k, 'h100 + 8 * g, int'(tdet[g]));
        cpu_wr(k, 'h104 + 8 * g, int'(trej[g]));
      end
    end

    // ---------------------------------------------------- run 1: divided frame
    W = SW; H = FH; bw = bwid();
    cap0 = new[bwid() * bhgt() * 36];
    cap1 = new[bwid() * bhgt() * 36];
    for (int k = 0; k < 2; k++) begin
      cpu_wr(k, 'h004, SW | (FH << 16));
      set_mode(k, int'(MODE_VERT) | ((k == 0) ? 8 : 0) | 16);
      cpu_wr(k, 'h00C, 0);
    end
    start_core(0);
    start_core(1);
    dma_frame(S0, S0 + SW, S1, S1 + SW);
    wait_done(2'b11);
    check_strip(S0, cap0, "strip 0");
    check_strip(S1, cap1, "strip 1");
    W = SW; H = FH;
    for (int k = 0; k < 2; k++) begin
      n = 0;
      do begin
        pop(k, got, d);
        if (got) begin
          n++;
          if (k == 0) check_det(d, 0, 0, cap0, bw, 1, 0, "strip 0");
          else        check_det(d, 0, 1, cap1, bw, 0, 0, "strip 1");
        end
      end while (got);
      checks++;
      if (n != 10) begin failures++; $display("strip %0d: %0d windows", k, n); end
    end
    cpu_rd(0, 'h01C, r);
    n_early += int'(r);

    // ---------------------------------------------------- run 2: feature sharing
    W = FW; H = FH; bw = bwid();
    cap0 = new[bwid() * bhgt() * 36];
    for (int k = 0; k < 2; k++) cpu_wr(k, 'h004, FW | (FH << 16));
    set_mode(0, int'(MODE_VERT) | 16);
    set_mode(1, int'(MODE_HORIZ) | 4 | 16);
    cpu_wr(1, 'h00C, 200000);
    start_core(1);
    start_core(0);
    n = 0;
    fork
      dma_frame(0, FW, FW, FW);
      begin
        do begin
          cpu_rd(0, 'h000, r);
          if (r[2]) begin
            pop(0, got, d);
            if (got) begin n++; check_det(d, 0, 0, cap0, bw, 0, 0, "shared/core 0"); end
          end
        end while (!done_seen[0] || r[2]);
      end
    join
    wait_done(2'b11);
    do begin
      pop(0, got, d);
      if (got) begin n++; check_det(d, 0, 0, cap0, bw, 0, 0, "shared/core 0"); end
    end while (got);
    checks++;
    if (n != 20) begin failures++; $display("shared/core 0: %0d windows", n); end
    n = 0;
    do begin
      pop(1, got, d);
      if (got) begin n++; check_det(d, 1, 1, cap0, bw, 0, 200000, "shared/core 1"); end
    end while (got);
    cpu_rd(1, 'h024, r);
    n_drop += int'(r);
    checks++;
    if (n != 16 || r != 4) begin failures++; $display("shared/core 1: %0d results, %0d dropped", n, r); end
    else n_share++;
    cpu_rd(1, 'h020, r);
    checks++;
    if (r != 20) begin failures++; $display("shared/core 1: %0d windows classified", r); end

    // ---------------------------------------------------- run 3: square window
    set_mode(0, int'(MODE_SQ_HEAD));
    set_mode(1, int'(MODE_SQ_TAIL) | 4 | 16);
    cpu_wr(1, 'h00C, -100000);
    start_core(1);
    start_core(0);
    dma_frame(0, FW, FW, FW);
    wait_done(2'b11);
    n = 0;
    do begin
      pop(1, got, d);
      if (got) begin n++; check_det(d, 2, 0, cap0, bw, 0, -100000, "square"); end
    end while (got);
    checks++;
    if (n != 4) begin failures++; $display("square: %0d windows", n); end
    else n_square += n;
    cpu_rd(0, 'h010, r);
    checks++;
    if (r[31]) begin failures++; $display("square: head core reported a result"); end

    // ---------------------------------------------------- mechanisms
    $display("mechanisms: stall %0d early %0d sharing %0d square %0d overflow %0d mode_switch %0d",
             n_stall, n_early, n_share, n_square, n_drop, n_switch);
    checks += 6;
    if (n_stall == 0)  begin failures++; $display("scan never stalled"); end
    if (n_early == 0)  begin failures++; $display("no early classification"); end
    if (n_share == 0)  begin failures++; $display("no feature sharing run"); end
    if (n_square == 0) begin failures++; $display("no square window"); end
    if (n_drop == 0)   begin failures++; $display("no FIFO overflow"); end
    if (n_switch == 0) begin failures++; $display("no mode switch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
