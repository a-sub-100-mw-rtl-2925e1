// hog_cell_histogram: orientation histogram of one 8x8 cell.
//
// Each pixel votes its gradient magnitude into the 9 orientation bins.  The
// weighted vote between neighbouring bins (orientation anti-aliasing) is
// approximated with the single weight 0.25: a pixel whose angle lies in the
// lower quarter of its bin gives 3/4 of its magnitude to its bin and 1/4 to
// the bin below, one in the upper quarter gives 1/4 to the bin above, and one
// in the middle half gives everything to its own bin.  Bins wrap around
// (bin 8 neighbours bin 0) because orientation is unsigned.  The weight 0.25
// is published; where the split points lie is this design's reading, and
// spatial anti-aliasing between cells is not done.
//
// Timing: one pixel per cycle.  first clears the accumulators with this
// pixel's vote; on last the complete histogram is registered on hist with
// hist_valid for one cycle, together with the cell position.
module hog_cell_histogram
  import hog_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             first,
  input  logic             last,
  input  logic [MAG_W-1:0] mag,
  input  logic [3:0]       bin,
  input  logic [7:0]       frac,
  input  logic [7:0]       cx,
  input  logic [7:0]       cy,
  output logic             hist_valid,
  output cell_hist_t       hist,
  output logic [7:0]       hist_cx,
  output logic [7:0]       hist_cy
);
  cell_hist_t acc, nxt;

  always_comb begin
    logic [MAG_W-1:0] quarter, main;
    logic [3:0] nb;
    logic split;
    quarter = mag >> 2;
    split   = (frac < 8'd64) || (frac >= 8'd192);
    main    = split ? mag - quarter : mag;
    if (frac < 8'd64) nb = (bin == 4'd0) ? 4'(NBINS - 1) : bin - 4'd1;
    else              nb = (bin == 4'(NBINS - 1)) ? 4'd0 : bin + 4'd1;
    nxt = first ? '0 : acc;
    for (int b = 0; b < NBINS; b++) begin
      if (4'(b) == bin)          nxt[b] = nxt[b] + HBIN_W'(main);
      if (split && 4'(b) == nb)  nxt[b] = nxt[b] + HBIN_W'(quarter);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      hist_valid <= 1'b0;
      hist <= '0;
      hist_cx <= '0;
      hist_cy <= '0;
    end else begin
      hist_valid <= in_valid && last;
      if (in_valid) begin
        acc <= nxt;
        if (last) begin
          hist    <= nxt;
          hist_cx <= cx;
          hist_cy <= cy;
        end
      end
    end
  end

endmodule
