// hog_line_buffer: input image buffer ("cell line buffer") of one core.
//
// Gray pixels arrive in raster order from the memory interface and are kept
// in a ring of ROWS pixel rows (row y lives in slot y mod ROWS).  The reader,
// the cell-scanning address generator, asks for one pixel position per cycle
// and gets its four neighbours (left, right, above, below) at once, with
// coordinates clamped to the frame edge, which is what the central-difference
// gradient needs.  The writer is held off (wr_ready low) while the row it
// would overwrite is still at or below the oldest row the reader needs
// (keep_row), so loading and cell scanning overlap without any data loss.
//
// Interface: start clears the write position; width/height are the frame
// size in pixels.  rows_done counts complete rows.  Reads are combinational.
// The ring depth and the four read ports are this design's choice; the
// published block diagram only names the buffer.
module hog_line_buffer
  import hog_pkg::*;
#(
  parameter int MAX_W = 1920,
  parameter int ROWS  = 16        // power of two, at least 2*CELL
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [10:0]      width,
  input  logic [10:0]      height,
  // write stream
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [PIX_W-1:0] wr_pix,
  output logic [11:0]      rows_done,
  input  logic [11:0]      keep_row,   // oldest row the reader still needs
  // read port: centre pixel position
  input  logic [10:0]      rd_x,
  input  logic [10:0]      rd_y,
  output logic [PIX_W-1:0] pix_l,
  output logic [PIX_W-1:0] pix_r,
  output logic [PIX_W-1:0] pix_u,
  output logic [PIX_W-1:0] pix_d
);
  localparam int SW = $clog2(ROWS);

  logic [PIX_W-1:0] mem [ROWS][MAX_W];
  logic [10:0] wx;
  logic [11:0] wy;

  assign rows_done = wy;
  // row wy may overwrite slot of row wy-ROWS only when that row is no longer needed
  assign wr_ready  = !start && (wy < {1'b0, height}) && (wy < keep_row + 12'(ROWS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wx <= '0;
      wy <= '0;
    end else if (start) begin
      wx <= '0;
      wy <= '0;
    end else if (wr_valid && wr_ready) begin
      if (wx == width - 11'd1) begin
        wx <= '0;
        wy <= wy + 12'd1;
      end else begin
        wx <= wx + 11'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_valid && wr_ready) mem[wy[SW-1:0]][wx] <= wr_pix;
  end

  // neighbour coordinates, clamped to the frame
  logic [10:0] xl, xr, yu, yd;
  always_comb begin
    xl = (rd_x == 11'd0) ? rd_x : rd_x - 11'd1;
    xr = (rd_x == width - 11'd1) ? rd_x : rd_x + 11'd1;
    yu = (rd_y == 11'd0) ? rd_y : rd_y - 11'd1;
    yd = (rd_y == height - 11'd1) ? rd_y : rd_y + 11'd1;
  end

  assign pix_l = mem[rd_y[SW-1:0]][xl];
  assign pix_r = mem[rd_y[SW-1:0]][xr];
  assign pix_u = mem[yu[SW-1:0]][rd_x];
  assign pix_d = mem[yd[SW-1:0]][rd_x];

endmodule
