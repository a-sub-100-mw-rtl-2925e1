// hog_early_classifier: early rejection / early detection at the end of a
// classification core.
//
// A window's intermediate result (its partial SVM sum after some block rows)
// is compared with an early detection threshold and an early rejection
// threshold.  If it is above the first or below the second, the window's
// classification flag is set and the decision (detected or rejected) is kept
// with it; a flag already set stays set with its earlier decision.  The
// result, flag and decision are registered and then stored with the
// intermediate result.  en = 0 (early classification switched off) passes the
// result through with the flag unchanged.
//
// The two comparisons, the flag and the registers follow the published
// block diagram of the early classification unit; keeping the decision bit
// next to the flag is this design's addition, needed to report the class of
// a window classified early.
// Timing: one cycle latency.
module hog_early_classifier
  import hog_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  inter_t                  in_res,
  input  logic                    en,
  input  logic signed [ACC_W-1:0] thr_det,
  input  logic signed [ACC_W-1:0] thr_rej,
  output logic                    out_valid,
  output inter_t                  out_res,
  output logic                    fired     // flag newly set in this stage
);
  logic above, below, fire;
  assign above = in_res.acc > thr_det;
  assign below = in_res.acc < thr_rej;
  assign fire  = en && !in_res.flag && (above || below);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_res   <= '0;
      fired     <= 1'b0;
    end else begin
      out_valid <= in_valid;
      fired     <= in_valid && fire;
      if (in_valid) begin
        out_res.acc  <= in_res.acc;
        out_res.flag <= in_res.flag || fire;
        out_res.dec  <= in_res.flag ? in_res.dec : (fire && above);
      end
    end
  end

endmodule
