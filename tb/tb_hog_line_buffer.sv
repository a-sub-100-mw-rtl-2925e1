// tb_hog_line_buffer: writes a 24x40 frame with random stalls of the reader
// position; checks that the writer is held back while the ring is full, and
// that the four neighbours of random positions (edges clamped) are the pixels
// written there.
module tb_hog_line_buffer;
  import hog_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int W = 24, H = 40;
  logic start = 0, wr_valid = 0, wr_ready;
  logic [7:0] wr_pix;
  logic [11:0] rows_done, keep_row = 0;
  logic [10:0] rd_x = 0, rd_y = 0;
  logic [7:0] pl, pr, pu, pd;

  hog_line_buffer #(.MAX_W(32), .ROWS(16)) dut (.clk, .rst_n, .start, .width(11'(W)), .height(11'(H)),
    .wr_valid, .wr_ready, .wr_pix, .rows_done, .keep_row, .rd_x, .rd_y,
    .pix_l(pl), .pix_r(pr), .pix_u(pu), .pix_d(pd));

  function automatic logic [7:0] P(int x, int y);
    return 8'((x * 37 + y * 11 + x * y) & 255);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int wx = 0, wy = 0;
  logic go = 0;
  // writer: always offers the next pixel
  always @(posedge clk) if (rst_n && wr_valid && wr_ready) begin
    if (wx == W - 1) begin wx = 0; wy++; end else wx++;
  end
  always @(negedge clk) begin
    wr_valid = go && (wy < H);
    wr_pix = P(wx, wy);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0; go = 1;
    // the ring holds 16 rows: with keep_row 0 the writer must stop at row 16
    repeat (W * 20) @(negedge clk);
    checks++;
    if (rows_done != 16 || wr_ready) begin failures++; $display("not held: rows %0d", rows_done); end
    // read back with the reader at the bottom of the window
    for (int t = 0; t < 400; t++) begin
      int x, y;
      x = $urandom_range(0, W - 1);
      y = $urandom_range(1, 14);
      rd_x = 11'(x); rd_y = 11'(y);
      #1;
      checks++;
      if (pl != P((x > 0) ? x - 1 : 0, y) || pr != P((x < W - 1) ? x + 1 : W - 1, y) ||
          pu != P(x, y - 1) || pd != P(x, y + 1)) begin
        failures++; $display("(%0d,%0d) wrong neighbours", x, y);
      end
    end
    // release rows step by step and follow the writer to the end of the frame
    for (int k = 1; k <= H; k++) begin
      keep_row = 12'(k);
      repeat (W + 2) @(negedge clk);
      if (k >= 24 && k <= 30) begin
        for (int t = 0; t < 20; t++) begin
          int x, y;
          x = $urandom_range(0, W - 1);
          y = $urandom_range(k + 1, k + 14);
          if (y > H - 1) y = H - 1;
          rd_x = 11'(x); rd_y = 11'(y);
          #1;
          checks++;
          if (pu != P(x, y - 1) || pd != P(x, (y < H - 1) ? y + 1 : H - 1) || pl != P((x > 0) ? x - 1 : 0, y)) begin
            failures++; $display("late (%0d,%0d) wrong neighbours", x, y);
          end
        end
      end
    end
    checks++;
    if (rows_done != 12'(H)) begin failures++; $display("rows_done %0d", rows_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
