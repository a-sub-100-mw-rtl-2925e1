// tb_hog_core_ctrl: checks configuration latching, block-size derivation,
// that the extraction path is started only with internal features, and that
// done follows the last feature beat of the last block.
module tb_hog_core_ctrl;
  import hog_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, f_valid = 0;
  core_cfg_t cfg_in, cfg;
  feat_beat_t f_beat;
  logic [7:0] bw, bh;
  logic xs, xon, busy, done;

  hog_core_ctrl dut (.clk, .rst_n, .start, .cfg_in, .f_valid, .f_beat, .cfg, .bw, .bh,
    .extract_start(xs), .extract_on(xon), .busy, .done);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(input bit ext, input int w, input int h);
    int n;
    cfg_in = '0;
    cfg_in.width = 11'(w); cfg_in.height = 11'(h); cfg_in.use_ext = ext; cfg_in.mode = MODE_HORIZ;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cfg_in.width = 11'd8;          // later changes must not matter
    checks++;
    if (xs != !ext || !busy || xon != !ext || cfg.width != 11'(w)) begin failures++; $display("start wrong"); end
    checks++;
    if (bw != 8'(w / 8 - 1) || bh != 8'(h / 8 - 1)) begin failures++; $display("bw/bh %0d %0d", bw, bh); end
    // a beat that is not the last block must not finish the frame
    f_beat = '0;
    f_beat.last = 1; f_beat.bx = bw - 8'd1; f_beat.by = 8'd0;
    f_valid = 1; @(negedge clk); f_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (!busy) begin failures++; $display("finished early"); end
    f_beat.by = bh - 8'd1;
    f_valid = 1; @(negedge clk); f_valid = 0;
    n = 0;
    while (!done && n < 20) begin @(negedge clk); n++; end
    checks++;
    if (n != 4) begin failures++; $display("done after %0d", n); end
    @(negedge clk);
    checks++;
    if (busy || xon) begin failures++; $display("still busy"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    frame(0, 64, 128);
    frame(1, 992, 1080);
    frame(0, 136, 80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
