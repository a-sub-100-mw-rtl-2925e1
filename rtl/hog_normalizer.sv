// hog_normalizer: two-stage L2-Hys normalisation of a 2x2-cell block.
//
// The four cell histograms of a block (36 values) are handled four at a
// time, one bin of every cell per cycle ("four-way"):
//   stage A  9 cycles  S1 = sum of squares of the raw bins
//            1/sqrt(S1) by Newton's method (hog_inv_sqrt)
//   stage B  9 cycles  f1 = v / sqrt(S1) in Q.12, clipped at CLIP,
//            S2 = sum of squares of f1
//            1/sqrt(S2)
//   stage C  9 cycles  f2 = f1 / sqrt(S2), saturated to 8 bits (value/256),
//            sent out as one beat of four features per cycle.
// Beat idx carries bin idx of cells 0..3 (top-left, top-right, bottom-left,
// bottom-right), so feature number k of the block is lane*9 + idx.
// A block takes 35 cycles from blk_valid to its last beat, well inside the 64
// cycles one cell takes, so the normaliser never has to stall the pipeline
// (an assertion checks that no block arrives while it is busy).  The
// assertion's "disable iff (!rst_n)" makes lint report rst_n as used both
// synchronously and asynchronously; only the checker samples it that way,
// every flop is reset asynchronously.
//
// The two-stage L2-Hys scheme and Newton's method follow the published
// architecture.  The clip level 0.2 is the usual L2-Hys value and, like all
// widths, this design's choice.
module hog_normalizer
  import hog_pkg::*;
#(
  parameter int CLIP = 819          // 0.2 in Q.12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       blk_valid,
  input  cell_hist_t blk [NLANE],
  input  logic [7:0] bx,
  input  logic [7:0] by,
  output logic       busy,
  output logic       out_valid,
  output feat_beat_t out_beat
);
  typedef enum logic [2:0] {S_IDLE, S_SUMA, S_WAITA, S_STB, S_WAITB, S_STC} state_e;
  state_e st;

  logic [HBIN_W-1:0] v [NLANE][NBINS];
  logic [3:0]  idx;
  logic [39:0] acc;
  logic [7:0]  bx_r, by_r;
  logic        is_start;
  logic [39:0] is_s;
  logic        is_done;
  logic [16:0] is_y;
  logic [5:0]  is_e;

  hog_inv_sqrt #(.S_W(40), .NEWTON_ITERS(2)) u_isqrt (
    .clk, .rst_n, .start(is_start), .s(is_s), .done(is_done), .y(is_y), .e(is_e)
  );

  logic [16:0] y_r;
  logic [5:0]  e_r;

  // per-lane arithmetic of the current bin
  logic [39:0] sq_sum;
  logic [HBIN_W-1:0] f1 [NLANE];
  logic [FEAT_W-1:0] f2 [NLANE];
  always_comb begin
    sq_sum = '0;
    for (int l = 0; l < NLANE; l++) begin
      logic [32:0] prod;
      logic [32:0] sh;
      prod = 33'(v[l][idx]) * 33'(y_r);
      // stage B: Q.12 result, clipped
      sh = prod >> (e_r + 6'd3);
      f1[l] = (sh > 33'(CLIP)) ? HBIN_W'(CLIP) : HBIN_W'(sh);
      // stage C: Q.8 result, saturated
      sh = prod >> (e_r + 6'd7);
      f2[l] = (sh > 33'd255) ? 8'd255 : 8'(sh);
      if (st == S_SUMA) sq_sum = sq_sum + 40'(32'(v[l][idx]) * 32'(v[l][idx]));
      else              sq_sum = sq_sum + 40'(32'(f1[l]) * 32'(f1[l]));
    end
  end

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      idx <= '0; acc <= '0; bx_r <= '0; by_r <= '0;
      y_r <= '0; e_r <= '0;
      is_start <= 1'b0; is_s <= '0;
      out_valid <= 1'b0; out_beat <= '0;
      for (int l = 0; l < NLANE; l++)
        for (int b = 0; b < NBINS; b++) v[l][b] <= '0;
    end else begin
      is_start  <= 1'b0;
      out_valid <= 1'b0;
      case (st)
        S_IDLE: if (blk_valid) begin
          for (int l = 0; l < NLANE; l++)
            for (int b = 0; b < NBINS; b++) v[l][b] <= blk[l][b];
          bx_r <= bx; by_r <= by;
          idx <= '0; acc <= '0;
          st <= S_SUMA;
        end
        S_SUMA: begin
          acc <= acc + sq_sum;
          idx <= idx + 4'd1;
          if (idx == 4'(NBINS - 1)) begin
            is_s <= acc + sq_sum;
            is_start <= 1'b1;
            st <= S_WAITA;
          end
        end
        S_WAITA: if (is_done) begin
          y_r <= is_y; e_r <= is_e;
          idx <= '0; acc <= '0;
          st <= S_STB;
        end
        S_STB: begin
          for (int l = 0; l < NLANE; l++) v[l][idx] <= f1[l];
          acc <= acc + sq_sum;
          idx <= idx + 4'd1;
          if (idx == 4'(NBINS - 1)) begin
            is_s <= acc + sq_sum;
            is_start <= 1'b1;
            st <= S_WAITB;
          end
        end
        S_WAITB: if (is_done) begin
          y_r <= is_y; e_r <= is_e;
          idx <= '0;
          st <= S_STC;
        end
        S_STC: begin
          out_valid <= 1'b1;
          for (int l = 0; l < NLANE; l++) out_beat.grp[l] <= f2[l];
          out_beat.idx   <= idx;
          out_beat.first <= (idx == 4'd0);
          out_beat.last  <= (idx == 4'(NBINS - 1));
          out_beat.bx    <= bx_r;
          out_beat.by    <= by_r;
          idx <= idx + 4'd1;
          if (idx == 4'(NBINS - 1)) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) blk_valid |-> !busy)
    else $error("block arrived while the normaliser was busy");

endmodule
