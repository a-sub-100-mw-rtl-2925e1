// hog_core_ctrl: controller of one HOG feature extraction core.
//
// On start it latches the configuration written by the CPU, derives the frame
// size in blocks, and starts either the feature-extraction path (line buffer
// and cell scanning) or, when the core takes the other core's HOG features,
// leaves that path switched off (extract_on low) so that only the SVM
// classification runs.  It watches the feature stream that reaches the SVM
// array; after the last beat of the last block of the frame it waits for the
// array to store its last results and then pulses done.
//
// Timing: start -> busy the next cycle; done 4 cycles after the last feature
// beat.  Switching the extraction path off in feature-sharing mode follows
// the published design; the rest is this design's own sequencing.
module hog_core_ctrl
  import hog_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  core_cfg_t  cfg_in,
  input  logic       f_valid,       // feature beat reaching the SVM array
  input  feat_beat_t f_beat,
  output core_cfg_t  cfg,
  output logic [7:0] bw,
  output logic [7:0] bh,
  output logic       extract_start, // one-cycle start for the extraction path
  output logic       extract_on,
  output logic       busy,
  output logic       done
);
  logic [2:0] drain;
  logic       draining;

  assign bw = 8'(cfg.width  >> 3) - 8'd1;
  assign bh = 8'(cfg.height >> 3) - 8'd1;
  assign extract_on = busy && !cfg.use_ext;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      extract_start <= 1'b0;
      drain <= '0;
      draining <= 1'b0;
    end else begin
      done <= 1'b0;
      extract_start <= 1'b0;
      if (start) begin
        cfg <= cfg_in;
        busy <= 1'b1;
        draining <= 1'b0;
        extract_start <= !cfg_in.use_ext;
      end else if (busy) begin
        if (f_valid && f_beat.last && f_beat.bx == bw - 8'd1 && f_beat.by == bh - 8'd1) begin
          draining <= 1'b1;
          drain <= '0;
        end else if (draining) begin
          drain <= drain + 3'd1;
          if (drain == 3'd3) begin
            draining <= 1'b0;
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

endmodule
