// hog_cordic_gradient: gradient magnitude and orientation of one pixel.
//
// The gradient is the central difference gx = right - left, gy = below -
// above (the [-1 0 1] mask of the original HOG).  Orientation is unsigned
// (0..180 degrees), so the vector is first folded into the upper half plane
// and, when it points left, pre-rotated by 90 degrees.  ITER CORDIC vectoring
// iterations then rotate it onto the x axis: the angle accumulated on the way
// is the orientation and the final x is the magnitude times the CORDIC gain
// (about 1.647).  The gain is left in, because block normalisation removes
// any common scale factor.
//
// Angles use 2304 units per 180 degrees, so the orientation bin (20 degrees)
// is angle/256 and the position inside the bin is the low 8 bits.  The
// arctangent table entry i is round(atan(2^-i) * 2304 / 180).
// Timing: one pixel per cycle, one cycle latency, TAG passed along.
// Using CORDIC follows the published algorithm; masks, widths and the angle
// unit are this design's own.
module hog_cordic_gradient
  import hog_pkg::*;
#(
  parameter int ITER  = 8,
  parameter int TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] pix_l,
  input  logic [PIX_W-1:0] pix_r,
  input  logic [PIX_W-1:0] pix_u,
  input  logic [PIX_W-1:0] pix_d,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [MAG_W-1:0] mag,
  output logic [3:0]       bin,
  output logic [7:0]       frac,
  output logic [TAG_W-1:0] out_tag
);
  localparam int W = 16;          // working width, 4 fractional bits
  localparam int ANG_180 = NBINS * BIN_ANG;

  function automatic logic [9:0] atan_tab(input int i);
    case (i)
      0: return 10'd576;  1: return 10'd340;  2: return 10'd180;
      3: return 10'd91;   4: return 10'd46;   5: return 10'd23;
      6: return 10'd11;   7: return 10'd6;    8: return 10'd3;
      9: return 10'd1;    default: return 10'd0;
    endcase
  endfunction

  logic signed [W-1:0] x0, y0;
  logic signed [13:0]  z0;
  logic signed [W-1:0] xs [ITER+1];
  logic signed [W-1:0] ys [ITER+1];
  logic signed [13:0]  zs [ITER+1];
  logic signed [13:0]  zf;
  logic [MAG_W-1:0]    mag_c;
  logic [11:0]         ang;

  always_comb begin
    logic signed [W-1:0] gx, gy;
    gx = W'($signed({1'b0, pix_r})) - W'($signed({1'b0, pix_l}));
    gy = W'($signed({1'b0, pix_d})) - W'($signed({1'b0, pix_u}));
    // fold to 0..180 degrees
    if (gy < 0 || (gy == 0 && gx < 0)) begin
      gx = -gx;
      gy = -gy;
    end
    if (gx < 0) begin            // 90..180 degrees: rotate by -90
      x0 = gy <<< 4;
      y0 = (-gx) <<< 4;
      z0 = 14'sd1152;
    end else begin
      x0 = gx <<< 4;
      y0 = gy <<< 4;
      z0 = 14'sd0;
    end
  end

  always_comb begin
    xs[0] = x0;
    ys[0] = y0;
    zs[0] = z0;
    for (int i = 0; i < ITER; i++) begin
      if (ys[i] > 0) begin
        xs[i+1] = xs[i] + (ys[i] >>> i);
        ys[i+1] = ys[i] - (xs[i] >>> i);
        zs[i+1] = zs[i] + 14'($signed({1'b0, atan_tab(i)}));
      end else begin
        xs[i+1] = xs[i] - (ys[i] >>> i);
        ys[i+1] = ys[i] + (xs[i] >>> i);
        zs[i+1] = zs[i] - 14'($signed({1'b0, atan_tab(i)}));
      end
    end
    zf = zs[ITER];
    // the folded vector lies in [0, 180) degrees: a result outside comes only
    // from the residual error of the last iteration, so clamp, do not wrap
    if (zf < 0)                    zf = 14'sd0;
    else if (zf >= 14'(ANG_180))   zf = 14'(ANG_180 - 1);
    ang   = 12'(zf);
    mag_c = MAG_W'(xs[ITER] >>> 4);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      mag <= '0; bin <= '0; frac <= '0; out_tag <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        mag     <= mag_c;
        bin     <= ang[11:8];
        frac    <= ang[7:0];
        out_tag <= in_tag;
      end
    end
  end

endmodule
