// tb_hog_cordic_gradient: checks magnitude and unsigned orientation of the
// CORDIC gradient unit against a floating-point atan2/sqrt reference for
// random and hand-picked pixel neighbourhoods, and the one-cycle latency.
module tb_hog_cordic_gradient;
  import hog_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real absr(input real v); return (v < 0.0) ? -v : v; endfunction

  logic in_valid = 0;
  logic [7:0] pl, pr, pu, pd;
  logic [15:0] tag_in;
  logic out_valid;
  logic [MAG_W-1:0] mag;
  logic [3:0] bin;
  logic [7:0] frac;
  logic [15:0] tag_out;

  hog_cordic_gradient #(.ITER(8), .TAG_W(16)) dut (
    .clk, .rst_n, .in_valid, .pix_l(pl), .pix_r(pr), .pix_u(pu), .pix_d(pd),
    .in_tag(tag_in), .out_valid, .mag, .bin, .frac, .out_tag(tag_out));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int l, r, u, d);
    real gx, gy, ang, rm, ra, diff;
    int a;
    @(negedge clk);
    pl = 8'(l); pr = 8'(r); pu = 8'(u); pd = 8'(d); tag_in = 16'(l * 7 + d);
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || tag_out != 16'(l * 7 + d)) begin
      failures++; $display("latency/tag wrong");
    end
    gx = real'(r - l); gy = real'(d - u);
    rm = $sqrt(gx*gx + gy*gy) * 1.646760258;
    checks++;
    if (absr(real'(mag) - rm) > 2.5 + rm * 0.01) begin
      failures++; $display("mag %0d ref %f (gx %0f gy %0f)", mag, rm, gx, gy);
    end
    if (rm > 8.0) begin
      ang = $atan2(gy, gx) * 180.0 / 3.14159265358979;
      if (ang < 0) ang += 180.0;
      if (ang >= 180.0) ang -= 180.0;
      ra = ang * 12.8;
      a = int'(bin) * 256 + int'(frac);
      diff = absr(real'(a) - ra);
      if (diff > 1152.0) diff = 2304.0 - diff;
      checks++;
      if (diff > 10.0) begin
        failures++; $display("angle %0d ref %f (gx %0f gy %0f)", a, ra, gx, gy);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(0, 100, 50, 50);   // 0 deg
    one(50, 50, 0, 100);   // 90 deg
    one(100, 0, 50, 50);   // 180 -> 0
    one(0, 100, 0, 100);   // 45
    one(100, 0, 0, 100);   // 135
    one(0, 255, 255, 0);   // -45 -> 135
    one(255, 0, 0, 255);   // 135
    one(10, 10, 10, 10);   // zero gradient
    for (int i = 0; i < 3000; i++)
      one($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
