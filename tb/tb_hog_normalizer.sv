// tb_hog_normalizer: random blocks (including an all-zero one and one with a
// dominant bin that hits the clip level) against a floating-point L2-Hys
// reference (normalise, clip at 0.2, normalise again, scale by 256); checks
// every feature within 2 LSB, the beat order and that a block is finished in
// fewer than 64 cycles (one cell time).
module tb_hog_normalizer;
  import hog_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic blk_valid = 0, busy, out_valid;
  cell_hist_t blk [NLANE];
  logic [7:0] bx = 0, by = 0;
  feat_beat_t out_beat;

  hog_normalizer dut (.clk, .rst_n, .blk_valid, .blk, .bx, .by, .busy, .out_valid, .out_beat);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real r [NLANE][NBINS];

  task automatic reference();
    real s;
    s = 0;
    foreach (r[l, b]) s += r[l][b] * r[l][b];
    if (s == 0) return;
    foreach (r[l, b]) begin
      r[l][b] = r[l][b] / $sqrt(s);
      if (r[l][b] > 0.2) r[l][b] = 0.2;
    end
    s = 0;
    foreach (r[l, b]) s += r[l][b] * r[l][b];
    foreach (r[l, b]) r[l][b] = r[l][b] / $sqrt(s) * 256.0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int n, beats;
      for (int l = 0; l < NLANE; l++)
        for (int b = 0; b < NBINS; b++) begin
          int v;
          v = (t == 0) ? 0 : $urandom_range(0, (t % 3 == 0) ? 300 : 40000);
          if (t == 1) v = (l == 0 && b == 0) ? 30000 : 50;
          blk[l][b] = 16'(v);
          r[l][b] = real'(v);
        end
      reference();
      @(negedge clk);
      blk_valid = 1; bx = 8'(t); by = 8'(t + 3);
      @(negedge clk);
      blk_valid = 0;
      n = 1; beats = 0;
      while (beats < NBINS && n < 200) begin
        if (out_valid) begin
          checks++;
          if (out_beat.idx != 4'(beats) || out_beat.first != (beats == 0) ||
              out_beat.last != (beats == NBINS - 1) || out_beat.bx != 8'(t) || out_beat.by != 8'(t + 3)) begin
            failures++; $display("beat order wrong");
          end
          for (int l = 0; l < NLANE; l++) begin
            real d;
            d = real'(out_beat.grp[l]) - ((r[l][beats] > 255.0) ? 255.0 : r[l][beats]);
            checks++;
            if (d > 2.0 || d < -2.0) begin
              failures++; $display("block %0d lane %0d bin %0d: %0d ref %f", t, l, beats, out_beat.grp[l], r[l][beats]);
            end
          end
          beats++;
        end
        @(negedge clk);
        n++;
      end
      checks++;
      if (n > 64 || busy) begin failures++; $display("block took %0d cycles", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
