// tb_hog_block_assembler: feeds the cell histograms of a 5x4-cell frame in
// raster order, each bin tagged with its cell position, and checks that the
// 4x3 blocks come out in raster order with the right four cells.
module tb_hog_block_assembler;
  import hog_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int CW = 5, CH = 4;
  logic cell_valid = 0, blk_valid;
  cell_hist_t cell_in;
  cell_hist_t blk [NLANE];
  logic [7:0] cx, cy, bx, by;

  hog_block_assembler #(.MAX_CW(8)) dut (.clk, .rst_n, .cell_valid, .cell_in, .cx, .cy,
    .blk_valid, .blk, .bx, .by);

  function automatic cell_hist_t H(int x, int y);
    cell_hist_t h;
    for (int b = 0; b < NBINS; b++) h[b] = 16'(x * 1000 + y * 100 + b);
    return h;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nblk = 0;
  always @(posedge clk) if (blk_valid) begin
    int ex, ey;
    ex = nblk % (CW - 1);
    ey = nblk / (CW - 1);
    checks++;
    if (bx != 8'(ex) || by != 8'(ey) || blk[0] != H(ex, ey) || blk[1] != H(ex + 1, ey)
        || blk[2] != H(ex, ey + 1) || blk[3] != H(ex + 1, ey + 1)) begin
      failures++; $display("block %0d wrong (bx %0d by %0d)", nblk, bx, by);
    end
    nblk++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < CH; y++)
      for (int x = 0; x < CW; x++) begin
        @(negedge clk);
        cell_valid = 1; cell_in = H(x, y); cx = 8'(x); cy = 8'(y);
        @(negedge clk);
        cell_valid = 0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    repeat (3) @(negedge clk);
    checks++;
    if (nblk != (CW - 1) * (CH - 1)) begin failures++; $display("%0d blocks", nblk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
