// tb_hog_addr_gen: scans a 24x24 frame (3x3 cells) while the number of loaded
// rows grows slowly; checks the cell-by-cell raster order, the cell markers,
// that no pixel is issued before its rows (and the row below) are loaded,
// and that the generator really stalls.
module tb_hog_addr_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int W = 24, H = 24;
  logic start = 0, valid, first, last, flast, busy;
  logic [11:0] rows_done = 0, keep_row;
  logic [10:0] x, y;
  logic [7:0] cx, cy;

  hog_addr_gen dut (.clk, .rst_n, .start, .width(11'(W)), .height(11'(H)), .rows_done, .keep_row,
    .valid, .ready(1'b1), .x, .y, .cx, .cy, .cell_first(first), .cell_last(last),
    .frame_last(flast), .busy);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rows arrive one every 30 cycles
  always begin
    repeat (30) @(negedge clk);
    if (rows_done < H) rows_done++;
  end

  initial begin
    int n = 0, stalls = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int ccy = 0; ccy < H / 8; ccy++)
      for (int ccx = 0; ccx < W / 8; ccx++)
        for (int py = 0; py < 8; py++)
          for (int px = 0; px < 8; px++) begin
            while (!valid) begin stalls++; @(negedge clk); end
            checks++;
            if (x != 11'(ccx * 8 + px) || y != 11'(ccy * 8 + py) || cx != 8'(ccx) || cy != 8'(ccy)
                || first != (px == 0 && py == 0) || last != (px == 7 && py == 7)
                || flast != (px == 7 && py == 7 && ccx == W / 8 - 1 && ccy == H / 8 - 1)) begin
              failures++; $display("pixel %0d: got (%0d,%0d)", n, x, y);
            end
            checks++;
            if (int'(rows_done) < ((ccy * 8 + 9 < H) ? ccy * 8 + 9 : H)) begin
              failures++; $display("issued before its rows were loaded");
            end
            n++;
            @(negedge clk);
          end
    checks++;
    if (busy || valid) begin failures++; $display("still busy"); end
    checks++;
    if (stalls == 0) begin failures++; $display("never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
