// tb_hog_svm_mac: random blocks of 9 beats through one MAC; checks the
// block sum (incoming value + dot products), the hold of a flagged window and
// of a disabled MAC, and the op count.
module tb_hog_svm_mac;
  import hog_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic beat = 0, first = 0, en = 1;
  feat_grp_t feat;
  logic [NLANE-1:0][COEF_W-1:0] coef;
  inter_t src, res;
  logic op;

  hog_svm_mac dut (.clk, .rst_n, .beat, .first, .en, .feat, .coef, .src, .res, .op);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      longint want;
      int nops;
      logic fl;
      fl = ($urandom_range(0, 3) == 0);
      en = ($urandom_range(0, 5) != 0);
      src.acc = $signed($urandom_range(0, 200000)) - 100000;
      src.flag = fl;
      src.dec = $urandom_range(0, 1);
      want = src.acc;
      nops = 0;
      for (int b = 0; b < NBINS; b++) begin
        @(negedge clk);
        beat = 1; first = (b == 0);
        for (int l = 0; l < NLANE; l++) begin
          feat[l] = 8'($urandom_range(0, 255));
          coef[l] = COEF_W'($urandom_range(0, 4095));
          want += longint'(feat[l]) * longint'($signed(coef[l]));
        end
        #1;
        if (op) nops++;
      end
      @(negedge clk);
      beat = 0;
      if (en) begin
        checks++;
        if (fl) begin
          if (res.acc != src.acc || !res.flag || res.dec != src.dec) begin
            failures++; $display("flagged window not held");
          end
        end else if (longint'(res.acc) != want || res.flag) begin
          failures++; $display("sum %0d want %0d", res.acc, want);
        end
      end
      checks++;
      if (nops != ((en && !fl) ? 9 : 0)) begin failures++; $display("ops %0d", nops); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
