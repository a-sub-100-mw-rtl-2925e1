// tb_hog_early_classifier: random intermediate results, flags and thresholds;
// checks the flag, decision and pass-through against the comparison rule.
module tb_hog_early_classifier;
  import hog_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, en;
  inter_t in_res, out_res;
  logic signed [ACC_W-1:0] thr_det, thr_rej;
  logic out_valid, fired;

  hog_early_classifier dut (.clk, .rst_n, .in_valid, .in_res, .en, .thr_det, .thr_rej,
    .out_valid, .out_res, .fired);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nfire = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      logic ef, ed, xf;
      @(negedge clk);
      in_valid = 1;
      en = ($urandom_range(0, 3) != 0);
      thr_det = $signed($urandom_range(0, 2000));
      thr_rej = -$signed($urandom_range(0, 2000));
      in_res.acc = $signed($urandom_range(0, 6000)) - 3000;
      in_res.flag = ($urandom_range(0, 4) == 0);
      in_res.dec = $urandom_range(0, 1);
      xf = en && !in_res.flag && (in_res.acc > thr_det || in_res.acc < thr_rej);
      ef = in_res.flag || xf;
      ed = in_res.flag ? in_res.dec : (xf && in_res.acc > thr_det);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || out_res.flag != ef || out_res.dec != ed || out_res.acc != in_res.acc
          || fired != xf) begin
        failures++;
        $display("acc %0d det %0d rej %0d: flag %b dec %b want %b %b",
                 in_res.acc, thr_det, thr_rej, out_res.flag, out_res.dec, ef, ed);
      end
      if (xf) nfire++;
    end
    checks++;
    if (nfire == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
