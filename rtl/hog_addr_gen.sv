// hog_addr_gen: cell-based scanning address generator.
//
// Walks the frame one 8x8 cell at a time, cells in raster order (cell 0 at
// the top left, then along the cell row), pixels of a cell in raster order,
// so a complete cell histogram is finished every 64 accepted pixels.  A cell
// row may only be scanned once the line buffer holds every pixel row it
// touches, including the row below it for the vertical gradient; until then
// the generator stalls (valid low).  keep_row tells the line buffer the oldest
// row still needed (one above the current cell row).
//
// Timing: one pixel position per cycle while ready is high.  cell_first and
// cell_last mark the first and last pixel of a cell; frame_last marks the last
// pixel of the frame.  The scan order follows the published cell-based
// scanning; the stall rule is this design's own.
module hog_addr_gen
  import hog_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [10:0] width,
  input  logic [10:0] height,
  input  logic [11:0] rows_done,
  output logic [11:0] keep_row,
  output logic        valid,
  input  logic        ready,
  output logic [10:0] x,
  output logic [10:0] y,
  output logic [7:0]  cx,
  output logic [7:0]  cy,
  output logic        cell_first,
  output logic        cell_last,
  output logic        frame_last,
  output logic        busy
);
  logic [2:0] px, py;
  logic [7:0] ncx, ncy;
  logic [11:0] need;

  assign ncx = 8'(width  >> 3);
  assign ncy = 8'(height >> 3);

  always_comb begin
    // rows 0 .. 8*cy+8 (clamped to the frame) must be present
    need = {1'b0, cy, 3'b0} + 12'd9;
    if (need > {1'b0, height}) need = {1'b0, height};
  end

  assign keep_row   = (cy == 8'd0) ? 12'd0 : {1'b0, cy, 3'b0} - 12'd1;
  assign valid      = busy && (rows_done >= need);
  assign x          = {cx, px};
  assign y          = {cy, py};
  assign cell_first = (px == 3'd0) && (py == 3'd0);
  assign cell_last  = (px == 3'd7) && (py == 3'd7);
  assign frame_last = cell_last && (cx == ncx - 8'd1) && (cy == ncy - 8'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      px <= '0; py <= '0; cx <= '0; cy <= '0;
    end else if (start) begin
      busy <= 1'b1;
      px <= '0; py <= '0; cx <= '0; cy <= '0;
    end else if (valid && ready) begin
      px <= px + 3'd1;
      if (px == 3'd7) begin
        py <= py + 3'd1;
        if (py == 3'd7) begin
          if (cx == ncx - 8'd1) begin
            cx <= '0;
            if (cy == ncy - 8'd1) begin
              busy <= 1'b0;
              cy <= '0;
            end else begin
              cy <= cy + 8'd1;
            end
          end else begin
            cx <= cx + 8'd1;
          end
        end
      end
    end
  end

endmodule
