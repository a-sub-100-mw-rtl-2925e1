// tb_hog_cpu_if: register writes and read-back for both cores, start and
// coefficient/threshold strobes with their decoded fields, status bits, the
// result FIFO (hits only, then every window), its overflow counter and the
// statistics read-out.
module tb_hog_cpu_if;
  import hog_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cpu_we = 0, cpu_re = 0, cpu_rvalid;
  logic [19:0] cpu_addr;
  logic [31:0] cpu_wdata, cpu_rdata;
  core_cfg_t cfg [2];
  logic [1:0] start, coef_we, thr_we;
  logic [6:0] coef_mac;
  logic [3:0] coef_grp, thr_stage;
  logic [1:0] coef_lane;
  logic [COEF_W-1:0] coef_data;
  logic thr_sel;
  logic signed [ACC_W-1:0] thr_data;
  logic [1:0] busy = 2'b01, done = 0, det_valid = 0;
  det_t det [2];
  logic [31:0] mac_ops [2], early_cnt [2], win_cnt [2];

  hog_cpu_if #(.FIFO_D(4)) dut (.clk, .rst_n, .cpu_we, .cpu_re, .cpu_addr, .cpu_wdata, .cpu_rdata, .cpu_rvalid,
    .cfg, .start, .coef_we, .coef_mac, .coef_grp, .coef_lane, .coef_data,
    .thr_we, .thr_stage, .thr_sel, .thr_data,
    .busy, .done, .det_valid, .det, .mac_ops, .early_cnt, .win_cnt);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [19:0] a, input logic [31:0] d, output logic [1:0] st,
                    output logic [1:0] cw, output logic [1:0] tw);
    @(negedge clk);
    cpu_we = 1; cpu_addr = a; cpu_wdata = d;
    #1;
    st = start; cw = coef_we; tw = thr_we;
    @(negedge clk);
    cpu_we = 0;
  endtask
  task automatic rd(input logic [19:0] a, output logic [31:0] d);
    @(negedge clk);
    cpu_re = 1; cpu_addr = a;
    @(negedge clk);
    cpu_re = 0;
    d = cpu_rdata;
    if (!cpu_rvalid) begin failures++; $display("no rvalid"); end
  endtask
  task automatic chk(input logic [31:0] got, input logic [31:0] want, input string what);
    checks++;
    if (got !== want) begin failures++; $display("%s: %h want %h", what, got, want); end
  endtask
  task automatic push(input int c, input int x, input int y, input bit hit);
    @(negedge clk);
    det_valid[c] = 1;
    det[c].wx = 8'(x); det[c].wy = 8'(y); det[c].hit = hit; det[c].early = x[0]; det[c].score = 32'(x * 1000 - y);
    @(negedge clk);
    det_valid[c] = 0;
  endtask

  initial begin
    logic [1:0] st, cw, tw;
    logic [31:0] d;
    mac_ops[0] = 111; mac_ops[1] = 222; early_cnt[0] = 3; early_cnt[1] = 4; win_cnt[0] = 5; win_cnt[1] = 6;
    det[0] = '0; det[1] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // configuration of core 1
    wr(20'h80004, {5'b0, 11'd1080, 5'b0, 11'd984}, st, cw, tw);
    wr(20'h80008, 32'h1D, st, cw, tw);
    wr(20'h8000C, 32'hFFFF_FF00, st, cw, tw);
    chk(32'(cfg[1].width), 984, "width");
    chk(32'(cfg[1].height), 1080, "height");
    chk(32'(cfg[1].mode), 32'(MODE_HORIZ), "mode");
    chk({cfg[1].report_all, cfg[1].early_en, cfg[1].use_ext}, 3'b111, "mode bits");
    chk(32'(cfg[1].svm_thr), 32'hFFFF_FF00, "svm thr");
    chk(32'(cfg[0].width), 0, "core 0 untouched");
    rd(20'h80004, d); chk(d, {5'b0, 11'd1080, 5'b0, 11'd984}, "size read");
    // coefficient and threshold strobes
    wr(20'h40000 | (20'd77 << 8) | (20'd5 << 4) | (20'd2 << 2), 32'h0000_0ABC, st, cw, tw);
    chk({30'b0, cw}, 1, "coef we core 0");
    chk({coef_mac, coef_grp, coef_lane}, {7'd77, 4'd5, 2'd2}, "coef fields");
    chk(32'(coef_data), 32'hABC, "coef data");
    wr(20'h80100 + 20'd13 * 8 + 4, 32'hFFFF_1234, st, cw, tw);
    chk({30'b0, tw}, 2, "thr we core 1");
    chk({28'b0, thr_stage}, 13, "thr stage");
    chk({31'b0, thr_sel}, 1, "thr sel");
    chk(thr_data, 32'hFFFF_1234, "thr data");
    // start and status
    wr(20'h00000, 32'h1, st, cw, tw);
    chk({30'b0, st}, 1, "start core 0");
    @(negedge clk); done[0] = 1; @(negedge clk); done[0] = 0;
    rd(20'h00000, d); chk(d, 32'h3, "status busy+done");
    // result FIFO of core 0: only hits (report_all off)
    push(0, 1, 2, 1); push(0, 3, 4, 0); push(0, 5, 6, 1);
    rd(20'h00000, d); chk(d, 32'h7, "status fifo not empty");
    rd(20'h00014, d); chk(d, 32'(1000 - 2), "score");
    rd(20'h00010, d); chk(d, {1'b1, 13'b0, 1'b1, 1'b1, 8'd2, 8'd1}, "result 0");
    rd(20'h00010, d); chk(d, {1'b1, 13'b0, 1'b1, 1'b1, 8'd6, 8'd5}, "result 1");
    rd(20'h00010, d); chk(d, 32'h0, "fifo empty");
    // core 1 reports every window; overflow after 4
    for (int i = 0; i < 6; i++) push(1, i, 9, 0);
    rd(20'h80024, d); chk(d, 2, "drops");
    for (int i = 0; i < 4; i++) begin
      rd(20'h80010, d); chk(d, {1'b1, 13'b0, 1'(i), 1'b0, 8'd9, 8'(i)}, "core 1 result");
    end
    rd(20'h80018, d); chk(d, 222, "mac ops");
    rd(20'h0001C, d); chk(d, 3, "early cnt");
    rd(20'h80020, d); chk(d, 6, "win cnt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
