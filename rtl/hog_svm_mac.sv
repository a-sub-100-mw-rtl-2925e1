// hog_svm_mac: one multiply-accumulate element of the reconfigurable MAC array.
//
// A block's 36 features arrive as 9 beats of four.  On the first beat the MAC
// starts a new partial sum from the intermediate result it is given (its
// neighbour's sum from the previous block, or the value read from the SRAM
// for intermediate results at the head of a chain), and adds the dot product
// of the four features with its four SVM coefficients; on the other beats it
// adds to its own sum.  The classification flag and early decision travel
// with the sum: a window already classified early is not computed any more,
// the MAC only takes over the incoming value and holds it.  en low (a window
// outside the frame, or an unused MAC) holds the whole MAC, standing in for
// the clock gating of the chip.
//
// Timing: one beat per cycle, result registered.  ops counts the beats
// actually computed, for power accounting.
module hog_svm_mac
  import hog_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            beat,    // a feature beat is present
  input  logic                            first,   // first beat of a block
  input  logic                            en,      // window valid and MAC in use
  input  feat_grp_t                       feat,
  input  logic [NLANE-1:0][COEF_W-1:0]    coef,
  input  inter_t                          src,     // intermediate result entering
  output inter_t                          res,
  output logic                            op       // computed this cycle
);
  logic signed [ACC_W-1:0] dot;
  always_comb begin
    dot = '0;
    for (int l = 0; l < NLANE; l++)
      dot = dot + ACC_W'($signed({1'b0, feat[l]}) * $signed(coef[l]));
  end

  inter_t base;
  assign base = first ? src : res;
  assign op   = beat && en && !base.flag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res <= '0;
    end else if (beat && en) begin
      res.flag <= base.flag;
      res.dec  <= base.dec;
      res.acc  <= base.flag ? base.acc : base.acc + dot;
    end
  end

endmodule
