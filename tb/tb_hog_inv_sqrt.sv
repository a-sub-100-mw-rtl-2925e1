// tb_hog_inv_sqrt: compares the Newton reciprocal square root with 1/sqrt(S)
// in floating point over many magnitudes of S, and checks the latency.
module tb_hog_inv_sqrt;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real absr(input real v); return (v < 0.0) ? -v : v; endfunction

  logic start = 0;
  logic [39:0] s;
  logic done;
  logic [16:0] y;
  logic [5:0] e;

  hog_inv_sqrt #(.S_W(40), .NEWTON_ITERS(2)) dut (.clk, .rst_n, .start, .s, .done, .y, .e);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [39:0] v);
    int n;
    real got, want;
    @(negedge clk);
    s = v; start = 1;
    @(negedge clk);
    start = 0;
    n = 1;
    while (!done && n < 20) begin @(negedge clk); n++; end
    checks++;
    if (n != 4) begin failures++; $display("latency %0d", n); end
    checks++;
    if (v == 0) begin
      if (y != 0) begin failures++; $display("S=0 gives %0d", y); end
    end else begin
      got  = real'(y) / 32768.0 / (2.0 ** e);
      want = 1.0 / $sqrt(real'(v));
      if (absr(got - want) / want > 1.0e-3) begin
        failures++; $display("S=%0d got %e want %e", v, got, want);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(0); one(1); one(2); one(3); one(4); one(255); one(65536); one(40'hFF_FFFF_FFFF);
    for (int i = 0; i < 2000; i++) begin
      logic [39:0] v;
      v = {$urandom, $urandom} >> $urandom_range(0, 38);
      one(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
