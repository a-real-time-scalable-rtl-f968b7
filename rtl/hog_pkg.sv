// hog_pkg: types and constants shared by the HOG detector.
//
// The detector works on 8x8-pixel cells, 2x2-cell blocks and 9 unsigned
// orientation bins (0..180 degrees), so one block feature has 4*9 = 36
// elements. Element index i = way*9 + bin, where way 0..3 is the position of
// the cell inside the block (top-left, top-right, bottom-left, bottom-right).
// The cell size, the 2x2 block and the 8x15 MAC array follow the source
// description; the number of bins and every bit width are this design's own
// choices (the description says only that widths were optimised).
package hog_pkg;
  localparam int unsigned CELL     = 8;    // pixels per cell side
  localparam int unsigned NBINS    = 9;    // orientation bins over 0..180 deg
  localparam int unsigned NWAYS    = 4;    // cell positions inside a 2x2 block
  localparam int unsigned BLK_DIM  = NWAYS * NBINS;  // 36
  localparam int unsigned PIX_W    = 8;    // grayscale pixel
  localparam int unsigned MAG_W    = 12;   // CORDIC magnitude (gain ~1.647 included)
  localparam int unsigned ANG_W    = 11;   // signed angle; 576 units = 180 deg
  localparam int unsigned ANG_HALF = 576;  // 180 deg, 64 units per bin
  localparam int unsigned HIST_W   = 16;   // cell histogram bin
  localparam int unsigned V1_W     = 12;   // first-stage normalised value, Q0.12
  localparam int unsigned FEAT_W   = 8;    // final HOG feature element, Q0.8
  localparam int unsigned COEF_W   = 8;    // signed SVM coefficient
  localparam int unsigned ACC_W    = 27;   // signed SVM partial sum (bound for 225 blocks)
  localparam int unsigned CRD_W    = 8;    // cell / block coordinate
  localparam int unsigned ARR_ROWS = 15;   // MAC array rows
  localparam int unsigned ARR_COLS = 8;    // MAC array columns
  localparam int unsigned NPE      = ARR_ROWS * ARR_COLS;  // 120 MACs
  localparam int unsigned NTHR     = 15;   // early thresholds per window row

  // Dataflow of the MAC array (chosen by the configuration register).
  typedef enum logic [1:0] {
    MODE_VERT    = 2'd0,  // 64x128 window: 15 chains of 7 MACs, chains along array rows
    MODE_HORZ    = 2'd1,  // 128x64 window: 7 chains of 15 MACs, chains along array columns
    MODE_SQ_HEAD = 2'd2,  // 128x128 window, window rows 0..7 (8 chains of 15)
    MODE_SQ_TAIL = 2'd3   // 128x128 window, window rows 8..14 (7 chains of 15)
  } svm_mode_e;

  typedef logic [HIST_W-1:0] hist_t;

  // Four weighted histograms of one cell, one per position in a block.
  typedef struct packed {
    logic [CRD_W-1:0] cx;
    logic [CRD_W-1:0] cy;
    logic [NWAYS-1:0][NBINS-1:0][HIST_W-1:0] h;
  } cell_pkt_t;

  // Un-normalised 36-element block histogram.
  typedef struct packed {
    logic [CRD_W-1:0] bx;
    logic [CRD_W-1:0] by;
    logic [BLK_DIM-1:0][HIST_W-1:0] h;
  } blk_hist_t;

  // Normalised block feature (the "partial HOG feature").
  typedef struct packed {
    logic [CRD_W-1:0] bx;
    logic [CRD_W-1:0] by;
    logic [BLK_DIM-1:0][FEAT_W-1:0] f;
  } feat_pkt_t;

  // Detection report: top-left block of the window, score, early flag.
  typedef struct packed {
    logic [CRD_W-1:0] wx;
    logic [CRD_W-1:0] wy;
    logic             early;
    logic signed [ACC_W-1:0] score;
  } det_t;

  // Intermediate classification result passed between cores (square mode).
  typedef struct packed {
    logic [CRD_W-1:0] wx;
    logic             alive;
    logic signed [ACC_W-1:0] acc;
  } xfer_t;

  // Partial sum held by one MAC.
  typedef struct packed {
    logic             alive;
    logic signed [ACC_W-1:0] acc;
  } psum_t;
endpackage
