// hog_inv_sqrt: reciprocal square root by Newton's method.
//
// The input S is range-reduced to S = m * 4^e with m in [1, 4).  An initial
// value for 1/sqrt(m) comes from a two-piece linear approximation (chords of
// 1/sqrt(m) over [1,2) and [2,4), error below 5 %), and NEWTON_ITERS steps of
// y <- y * (3 - m*y*y) / 2, one per cycle, refine it; two steps leave an
// error of a few 1e-5.  The result is 1/sqrt(S) = y * 2^-15 * 2^-e, with y
// in Q1.15 (between 0.5 and 1).  S = 0 gives y = 0.
//
// Timing: start with S, done one cycle after the last Newton step
// (NEWTON_ITERS + 1 cycles after start).  Using Newton's method with an
// approximated initial value follows the published algorithm; the range
// reduction, initial-value chords and widths are this design's own.
module hog_inv_sqrt #(
  parameter int S_W          = 40,
  parameter int NEWTON_ITERS = 2
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [S_W-1:0] s,
  output logic           done,
  output logic [16:0]    y,      // Q1.15
  output logic [5:0]     e
);
  logic [16:0] m_q;               // Q2.14, 1.0 .. 4.0
  logic [16:0] y0;
  logic [5:0]  e0;
  logic [3:0]  cnt;
  logic        run;
  logic        zero;

  // range reduction and initial value
  always_comb begin
    int p;
    logic [S_W+13:0] ext;
    logic [31:0] t;
    p = 0;
    for (int i = 0; i < S_W; i++) if (s[i]) p = i;
    e0  = 6'(p / 2);
    ext = {s, 14'b0} >> (2 * e0);
    m_q = 17'(ext);
    if (m_q < 17'd32768) begin
      t  = 32'(m_q - 17'd16384) * 32'd9598;
      y0 = 17'd32768 - 17'(t >> 14);
    end else begin
      t  = 32'(m_q - 17'd32768) * 32'd3395;
      y0 = 17'd23170 - 17'(t >> 14);
    end
  end

  logic [16:0] m_r;
  logic [16:0] y_next;
  always_comb begin
    logic [33:0] y2;
    logic [33:0] my2;
    logic [17:0] tt;
    logic [34:0] yt;
    y2     = 34'(y) * 34'(y);          // Q2.30
    y2     = y2 >> 15;                 // Q.15
    my2    = 34'(m_r) * y2;            // Q.29
    my2    = my2 >> 14;                // Q.15
    tt     = 18'd98304 - 18'(my2);     // 3.0 - m*y^2
    yt     = 35'(y) * 35'(tt);
    y_next = 17'(yt >> 16);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y <= '0; e <= '0; m_r <= '0; cnt <= '0; run <= 1'b0; done <= 1'b0; zero <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        y    <= y0;
        e    <= e0;
        m_r  <= m_q;
        zero <= (s == '0);
        cnt  <= '0;
        run  <= 1'b1;
      end else if (run) begin
        if (cnt == 4'(NEWTON_ITERS)) begin
          run  <= 1'b0;
          done <= 1'b1;
          if (zero) y <= '0;
        end else begin
          y   <= y_next;
          cnt <= cnt + 4'd1;
        end
      end
    end
  end

endmodule
