// hog_pkg: widths, types and constants shared by the HOG accelerator.
//
// The cell size, block size, number of orientation bins and the 7x15-block
// detection window follow the published algorithm parameters.  All bit
// widths below (pixel, magnitude, histogram bin, feature, coefficient,
// accumulator) are this design's own choices; the published text only says
// that the bit widths were optimised, without giving them.
package hog_pkg;

  localparam int PIX_W   = 8;    // gray pixel
  localparam int CELL    = 8;    // cell is CELL x CELL pixels
  localparam int NBINS   = 9;    // orientation bins over 0..180 degrees
  localparam int NLANE   = 4;    // cells per block (2x2), processed side by side
  localparam int MAG_W   = 11;   // CORDIC magnitude (includes the CORDIC gain)
  localparam int HBIN_W  = 16;   // one bin of a cell histogram
  localparam int FEAT_W  = 8;    // normalised feature, unsigned, value/256
  localparam int COEF_W  = 12;   // SVM coefficient, signed
  localparam int ACC_W   = 32;   // SVM partial sum, signed
  localparam int ANG_W   = 12;   // CORDIC angle: 180 degrees = 9*256 units
  localparam int BIN_ANG = 256;  // angle units per orientation bin
  localparam int NSTAGE  = 14;   // early classification stages per window

  // SVM array configuration (detection-window shape)
  typedef enum logic [1:0] {
    MODE_VERT    = 2'd0,  // 64x128 pixel window: 15 classification cores x 7 MACs
    MODE_HORIZ   = 2'd1,  // 128x64 pixel window: 7 classification cores x 15 MACs
    MODE_SQ_HEAD = 2'd2,  // 128x128 window, upper 8 block rows (core 0)
    MODE_SQ_TAIL = 2'd3   // 128x128 window, lower 7 block rows (core 1)
  } svm_mode_e;

  typedef logic [NBINS-1:0][HBIN_W-1:0] cell_hist_t;
  typedef logic [NLANE-1:0][FEAT_W-1:0] feat_grp_t;

  // Per-core configuration written by the CPU
  typedef struct packed {
    logic [10:0]        width;     // frame width in pixels, multiple of CELL
    logic [10:0]        height;    // frame height in pixels, multiple of CELL
    svm_mode_e          mode;
    logic               use_ext;   // take HOG features from the other core
    logic               early_en;  // early rejection / detection enabled
    logic               report_all;// push every classified window, not only hits
    logic signed [ACC_W-1:0] svm_thr;
  } core_cfg_t;

  // A stream beat of HOG features: one bin of the four cells of a block
  typedef struct packed {
    feat_grp_t  grp;
    logic [3:0] idx;   // bin index 0..8
    logic       first;
    logic       last;
    logic [7:0] bx;
    logic [7:0] by;
  } feat_beat_t;

  // Intermediate classification result stored per window
  typedef struct packed {
    logic                    flag;  // classified early
    logic                    dec;   // early decision (1 = detected)
    logic signed [ACC_W-1:0] acc;
  } inter_t;

  // Final classification of one detection window
  typedef struct packed {
    logic [7:0]              wx;
    logic [7:0]              wy;
    logic                    hit;
    logic                    early;
    logic signed [ACC_W-1:0] score;
  } det_t;

endpackage
