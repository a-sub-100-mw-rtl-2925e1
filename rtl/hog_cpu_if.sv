// hog_cpu_if: 32-bit CPU register interface of the dual-core accelerator.
//
// The host configures each core, loads its SVM coefficients and early
// classification thresholds, starts it and reads back detection results.
// Results of each core go into a FIFO of FIFO_D entries; by default only
// windows classified as the target are pushed, with report_all every window.
// A result arriving at a full FIFO is dropped and counted.
//
// Byte address map (bit 19 selects core 0 or 1):
//   bit 18 = 1  SVM coefficient: bits [14:8] MAC, [7:4] bin, [3:2] lane,
//               data[11:0]
//   0x000 CTRL     W: bit0 start      R: bit0 busy, bit1 done (cleared by
//                  start), bit2 result FIFO not empty
//   0x004 SIZE     [10:0] width, [26:16] height (pixels)
//   0x008 MODE     [1:0] window mode, [2] use other core's features,
//                  [3] early classification, [4] report every window
//   0x00C SVM_THR  signed SVM threshold
//   0x010 RESULT   R, pops: [31] valid, [17] early, [16] hit, [15:8] wy, [7:0] wx
//   0x014 SCORE    R: score of the FIFO head (read before RESULT)
//   0x018 MAC_OPS, 0x01C EARLY_CNT, 0x020 WIN_CNT, 0x024 DROP_CNT   R
//   0x100 + 8g     early detection threshold of stage g (g = 0..13)
//   0x104 + 8g     early rejection threshold of stage g
// Protocol: a write takes effect on the cycle cpu_we is high; a read returns
// cpu_rdata with cpu_rvalid one cycle after cpu_re.  The register map and
// FIFO are this design's own; the published text only says that an external
// CPU controls the accelerator and receives the detection results.
module hog_cpu_if
  import hog_pkg::*;
#(
  parameter int FIFO_D = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cpu_we,
  input  logic                    cpu_re,
  input  logic [19:0]             cpu_addr,
  input  logic [31:0]             cpu_wdata,
  output logic [31:0]             cpu_rdata,
  output logic                    cpu_rvalid,
  // to the cores
  output core_cfg_t               cfg [2],
  output logic [1:0]              start,
  output logic [1:0]              coef_we,
  output logic [6:0]              coef_mac,
  output logic [3:0]              coef_grp,
  output logic [1:0]              coef_lane,
  output logic [COEF_W-1:0]       coef_data,
  output logic [1:0]              thr_we,
  output logic [3:0]              thr_stage,
  output logic                    thr_sel,
  output logic signed [ACC_W-1:0] thr_data,
  // from the cores
  input  logic [1:0]              busy,
  input  logic [1:0]              done,
  input  logic [1:0]              det_valid,
  input  det_t                    det [2],
  input  logic [31:0]             mac_ops [2],
  input  logic [31:0]             early_cnt [2],
  input  logic [31:0]             win_cnt [2]
);
  localparam int AW = $clog2(FIFO_D);

  logic        c;
  logic        is_coef;
  logic [11:0] off;
  assign c       = cpu_addr[19];
  assign is_coef = cpu_addr[18];
  assign off     = cpu_addr[11:0];

  // ---------------------------------------------------------------- writes
  assign coef_mac  = cpu_addr[14:8];
  assign coef_grp  = cpu_addr[7:4];
  assign coef_lane = cpu_addr[3:2];
  assign coef_data = cpu_wdata[COEF_W-1:0];
  assign thr_stage = 4'(off[7:3]);
  assign thr_sel   = off[2];
  assign thr_data  = cpu_wdata;

  always_comb begin
    coef_we = '0;
    thr_we  = '0;
    start   = '0;
    if (cpu_we) begin
      if (is_coef)                        coef_we[c] = 1'b1;
      else if (off[11:8] == 4'h1)         thr_we[c]  = 1'b1;
      else if (off == 12'h000 && cpu_wdata[0]) start[c] = 1'b1;
    end
  end

  logic [1:0] done_st;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg[0] <= '0;
      cfg[1] <= '0;
      done_st <= '0;
    end else begin
      for (int k = 0; k < 2; k++) begin
        if (start[k])     done_st[k] <= 1'b0;
        else if (done[k]) done_st[k] <= 1'b1;
      end
      if (cpu_we && !is_coef) begin
        case (off)
          12'h004: begin
            cfg[c].width  <= cpu_wdata[10:0];
            cfg[c].height <= cpu_wdata[26:16];
          end
          12'h008: begin
            cfg[c].mode       <= svm_mode_e'(cpu_wdata[1:0]);
            cfg[c].use_ext    <= cpu_wdata[2];
            cfg[c].early_en   <= cpu_wdata[3];
            cfg[c].report_all <= cpu_wdata[4];
          end
          12'h00C: cfg[c].svm_thr <= cpu_wdata;
          default: ;
        endcase
      end
    end
  end

  // ---------------------------------------------------------------- result FIFOs
  det_t        fifo [2][FIFO_D];
  logic [AW:0] wp [2];
  logic [AW:0] rp [2];
  logic [31:0] drops [2];
  logic [1:0]  pop;

  always_comb begin
    pop = '0;
    if (cpu_re && !is_coef && off == 12'h010 && wp[c] != rp[c]) pop[c] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 2; k++) begin
        wp[k] <= '0; rp[k] <= '0; drops[k] <= '0;
      end
    end else begin
      for (int k = 0; k < 2; k++) begin
        if (start[k]) begin
          wp[k] <= '0; rp[k] <= '0; drops[k] <= '0;
        end else begin
          if (det_valid[k] && (det[k].hit || cfg[k].report_all)) begin
            if ((wp[k] - rp[k]) == (AW+1)'(FIFO_D)) drops[k] <= drops[k] + 32'd1;
            else                                    wp[k] <= wp[k] + 1'b1;
          end
          if (pop[k]) rp[k] <= rp[k] + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < 2; k++)
      if (det_valid[k] && (det[k].hit || cfg[k].report_all) && (wp[k] - rp[k]) != (AW+1)'(FIFO_D))
        fifo[k][wp[k][AW-1:0]] <= det[k];
  end

  // ---------------------------------------------------------------- reads
  det_t h;
  logic ne;
  always_comb begin
    h  = fifo[c][rp[c][AW-1:0]];
    ne = (wp[c] != rp[c]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cpu_rdata  <= '0;
      cpu_rvalid <= 1'b0;
    end else begin
      cpu_rvalid <= cpu_re;
      if (cpu_re) begin
        cpu_rdata <= '0;
        if (!is_coef) begin
          case (off)
            12'h000: cpu_rdata <= {29'b0, ne, done_st[c], busy[c]};
            12'h004: cpu_rdata <= {5'b0, cfg[c].height, 5'b0, cfg[c].width};
            12'h008: cpu_rdata <= {27'b0, cfg[c].report_all, cfg[c].early_en, cfg[c].use_ext, cfg[c].mode};
            12'h00C: cpu_rdata <= cfg[c].svm_thr;
            12'h010: cpu_rdata <= ne ? {1'b1, 13'b0, h.early, h.hit, h.wy, h.wx} : '0;
            12'h014: cpu_rdata <= h.score;
            12'h018: cpu_rdata <= mac_ops[c];
            12'h01C: cpu_rdata <= early_cnt[c];
            12'h020: cpu_rdata <= win_cnt[c];
            12'h024: cpu_rdata <= drops[c];
            default: ;
          endcase
        end
      end
    end
  end

endmodule
