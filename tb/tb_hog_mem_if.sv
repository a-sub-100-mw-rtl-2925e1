// tb_hog_mem_if: random words for core 0, core 1 or both, with random
// back-pressure from the cores; checks each core receives exactly its
// pixels in order, lowest byte first.
module tb_hog_mem_if;
  import hog_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic mem_we = 0, mem_ready;
  logic [1:0] mem_core, pix_valid, pix_ready;
  logic [31:0] mem_wdata;
  logic [7:0] pix [2];

  hog_mem_if dut (.clk, .rst_n, .mem_we, .mem_core, .mem_wdata, .mem_ready, .pix_valid, .pix_ready, .pix);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] q [2][$];
  always @(negedge clk) pix_ready = 2'($urandom_range(0, 3));
  always @(posedge clk) if (rst_n)
    for (int k = 0; k < 2; k++)
      if (pix_valid[k] && pix_ready[k]) begin
        checks++;
        if (q[k].size() == 0 || pix[k] != q[k][0]) begin
          failures++; $display("core %0d: got %0h", k, pix[k]);
        end
        if (q[k].size() != 0) void'(q[k].pop_front());
      end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      logic [1:0] c;
      logic [31:0] w;
      c = 2'($urandom_range(1, 3));
      w = $urandom;
      @(negedge clk);
      mem_we = 1; mem_core = c; mem_wdata = w;
      @(posedge clk);
      while (!mem_ready) @(posedge clk);
      for (int k = 0; k < 2; k++)
        if (c[k]) for (int b = 0; b < 4; b++) q[k].push_back(w[8*b +: 8]);
      @(negedge clk);
      mem_we = 0;
    end
    repeat (40) @(negedge clk);
    checks++;
    if (q[0].size() != 0 || q[1].size() != 0) begin failures++; $display("pixels lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
