// tb_hog_cell_histogram: feeds random pixel votes for several cells and
// compares the 9-bin histograms with a reference computed here from the
// voting rule (3/4 + 1/4 split in the outer quarters of a bin, wrap-around).
module tb_hog_cell_histogram;
  import hog_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, first = 0, last = 0;
  logic [MAG_W-1:0] mag;
  logic [3:0] bin;
  logic [7:0] frac, cx, cy;
  logic hist_valid;
  cell_hist_t hist;
  logic [7:0] hcx, hcy;

  hog_cell_histogram dut (.clk, .rst_n, .in_valid, .first, .last, .mag, .bin, .frac,
    .cx, .cy, .hist_valid, .hist, .hist_cx(hcx), .hist_cy(hcy));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_h [NBINS];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 40; c++) begin
      foreach (ref_h[b]) ref_h[b] = 0;
      for (int p = 0; p < 64; p++) begin
        int m, bb, f, q;
        m = (c == 0) ? 100 : $urandom_range(0, 600);
        bb = $urandom_range(0, 8);
        f = (p < 4) ? p * 64 + 10 : $urandom_range(0, 255);
        q = m / 4;
        if (f < 64)       begin ref_h[bb] += m - q; ref_h[(bb + 8) % 9] += q; end
        else if (f >= 192) begin ref_h[bb] += m - q; ref_h[(bb + 1) % 9] += q; end
        else               ref_h[bb] += m;
        @(negedge clk);
        // an idle cycle now and then must not disturb the accumulation
        if ($urandom_range(0, 7) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1; first = (p == 0); last = (p == 63);
        mag = MAG_W'(m); bin = 4'(bb); frac = 8'(f); cx = 8'(c); cy = 8'(c + 1);
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!hist_valid || hcx != 8'(c) || hcy != 8'(c + 1)) begin
        failures++; $display("cell %0d: no histogram", c);
      end
      for (int b = 0; b < NBINS; b++) begin
        checks++;
        if (int'(hist[b]) != ref_h[b]) begin
          failures++; $display("cell %0d bin %0d: %0d ref %0d", c, b, hist[b], ref_h[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
