// hog_mem_if: memory interface that loads the gray image into the cores.
//
// An external DMA writes 32-bit words, each holding four 8-bit pixels in
// raster order (lowest byte first), together with a two-bit core mask.  Each
// core has its own one-word buffer and unpacker, which hands the core one
// pixel per cycle, so both cores can be fed at full rate by alternating
// words.  A word is accepted (mem_ready) when the buffers of all cores it is
// meant for are empty; a word for both cores (the overlapping columns of a
// vertically divided frame, or a shared frame) is copied into both.
// Timing: a word is taken in one cycle; its pixels leave on the following
// cycles, one per cycle while the core accepts them.  Packing and handshake
// are this design's own; the published text names the interface and the
// 32-bit bus only.
module hog_mem_if
  import hog_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mem_we,
  input  logic [1:0]       mem_core,
  input  logic [31:0]      mem_wdata,
  output logic             mem_ready,
  output logic [1:0]       pix_valid,
  input  logic [1:0]       pix_ready,
  output logic [PIX_W-1:0] pix [2]
);
  logic [31:0] word [2];
  logic [2:0]  left [2];   // pixels still to send
  logic [1:0]  busy;

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      busy[k]      = (left[k] != 3'd0);
      pix_valid[k] = busy[k];
      pix[k]       = word[k][8*(3'd4 - left[k]) +: 8];
    end
  end
  assign mem_ready = ((busy & mem_core) == 2'b00);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 2; k++) begin
        word[k] <= '0;
        left[k] <= '0;
      end
    end else begin
      for (int k = 0; k < 2; k++) begin
        if (mem_we && mem_ready && mem_core[k]) begin
          word[k] <= mem_wdata;
          left[k] <= 3'd4;
        end else if (busy[k] && pix_ready[k]) begin
          left[k] <= left[k] - 3'd1;
        end
      end
    end
  end

endmodule
