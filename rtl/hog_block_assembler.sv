// hog_block_assembler: SRAM for intermediate cell histograms and block
// formation.
//
// Cell histograms arrive in raster order of cells.  Two cell rows are kept,
// the row being produced and the one above it (row cy lives in bank cy mod
// 2).  When cell (cx, cy) with cx >= 1 and cy >= 1 arrives it completes the
// lower-right corner of the 2x2-cell block (bx, by) = (cx-1, cy-1); the block
// is then sent out with its four cells in the order top-left, top-right,
// bottom-left, bottom-right.  Blocks therefore leave in raster order, block 0
// when cell 1 of the second cell row (cell CW+1) completes, as in the
// published cell-based pipeline.
//
// Timing: blk_valid is a one-cycle pulse, one cycle after cell_valid.
// The memory is read combinationally; cells within a frame arrive at most
// once per cycle.
module hog_block_assembler
  import hog_pkg::*;
#(
  parameter int MAX_CW = 240
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cell_valid,
  input  cell_hist_t cell_in,
  input  logic [7:0] cx,
  input  logic [7:0] cy,
  output logic       blk_valid,
  output cell_hist_t blk [NLANE],
  output logic [7:0] bx,
  output logic [7:0] by
);
  cell_hist_t mem [2][MAX_CW];

  always_ff @(posedge clk) begin
    if (cell_valid) mem[cy[0]][cx] <= cell_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk_valid <= 1'b0;
      bx <= '0;
      by <= '0;
      for (int l = 0; l < NLANE; l++) blk[l] <= '0;
    end else begin
      blk_valid <= cell_valid && (cx != 8'd0) && (cy != 8'd0);
      if (cell_valid && (cx != 8'd0) && (cy != 8'd0)) begin
        blk[0] <= mem[~cy[0]][cx - 8'd1];
        blk[1] <= mem[~cy[0]][cx];
        blk[2] <= mem[cy[0]][cx - 8'd1];
        blk[3] <= cell_in;
        bx <= cx - 8'd1;
        by <= cy - 8'd1;
      end
    end
  end

endmodule
