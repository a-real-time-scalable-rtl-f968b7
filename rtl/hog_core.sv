// hog_core: one HOG feature extraction core.
//
// Pixel words from the memory interface fill the cell line buffer; the cell
// histogram generator scans the frame cell by cell (gradient by CORDIC,
// four-way shift-weighted voting); the block assembler keeps cell
// histograms in a working SRAM until 2x2 cells are complete; the two-stage
// normaliser turns each block into a 36-element HOG feature; the SVM
// classifier accumulates it into every window that contains the block and
// reports detections to the controller, which the CPU reads. This cell-based
// pipeline and the block structure follow the source description.
//
// Feature sharing: the normalised features leave the core on feat_out_* and
// the features of the other core arrive on feat_in_*. A configuration flag
// switches the classifier's input MUX to the other core, so one core can
// extract features for both (its own extraction is then switched off by
// the extract_en flag). A feature is handed over only when every classifier
// that uses it can take it: feat_out_fire is that condition and the other
// core uses it as the valid qualifier. Intermediate classification results
// for square windows travel on xfer_out/xfer_in.
//
// Frame geometry per core: up to IMG_W pixels per row and any number of
// rows that are a multiple of 8 (set by the CPU in cells).
module hog_core
  import hog_pkg::*;
#(
  parameter int unsigned IMG_W = 1920,
  parameter int unsigned ITER  = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  // register bus (from the CPU interface)
  input  logic         reg_we,
  input  logic         reg_re,
  input  logic [14:0]  reg_addr,
  input  logic [31:0]  reg_wdata,
  output logic [31:0]  reg_rdata,
  output logic         irq,
  output logic         busy,
  // pixel words (from the memory interface)
  input  logic         pix_valid,
  input  logic [31:0]  pix_data,
  output logic         pix_ready,
  // HOG features to / from the other core
  output logic         feat_out_valid,
  output feat_pkt_t    feat_out_pkt,
  output logic         feat_out_fire,
  output logic         uses_peer_feat,
  output logic         svm_ready_out,
  input  logic         feat_in_valid,
  input  feat_pkt_t    feat_in_pkt,
  input  logic         feat_in_fire,
  input  logic         peer_uses_our_feat,
  input  logic         peer_svm_ready,
  // intermediate classification results to / from the other core
  output logic         xfer_out_valid,
  output xfer_t        xfer_out,
  input  logic         xfer_in_valid,
  input  xfer_t        xfer_in
);
  localparam int unsigned MAX_CX = IMG_W / CELL;
  localparam int unsigned ROW_W  = 12;

  // configuration
  logic frame_start, feat_src_peer, extract_en, ec_en;
  svm_mode_e mode;
  logic [CRD_W-1:0] cells_x, cells_y;
  logic signed [ACC_W-1:0] thr_det [NTHR];
  logic signed [ACC_W-1:0] thr_rej [NTHR];
  logic signed [ACC_W-1:0] final_thr;
  logic coef_we;
  logic [$clog2(NPE)-1:0] coef_pe;
  logic [5:0] coef_idx;
  logic signed [COEF_W-1:0] coef_data;

  // line buffer and cell scan
  logic [ROW_W-1:0] rows_done;
  logic [CRD_W-1:0] scan_cy;
  logic [3:0][ROW_W-1:0] rd_row, rd_col;
  logic [3:0][PIX_W-1:0] rd_pix;

  cell_line_buffer #(.IMG_W(IMG_W), .NROWS(24), .ROW_W(ROW_W)) u_linebuf (
    .clk, .rst_n, .frame_start,
    .width_px(ROW_W'(cells_x) << 3), .height_px(ROW_W'(cells_y) << 3),
    .scan_cy, .wr_valid(pix_valid), .wr_data(pix_data), .wr_ready(pix_ready),
    .rows_done, .rd_row, .rd_col, .rd_pix
  );

  logic cell_valid, cell_ready, chg_busy, chg_done;
  cell_pkt_t cell_pkt;
  cell_hist_gen #(.ITER(ITER), .ROW_W(ROW_W)) u_cellhist (
    .clk, .rst_n, .start(frame_start && extract_en), .cells_x, .cells_y,
    .rows_done, .scan_cy, .rd_row, .rd_col, .rd_pix,
    .out_valid(cell_valid), .out_pkt(cell_pkt), .out_ready(cell_ready),
    .busy(chg_busy), .done(chg_done)
  );

  logic blk_valid, blk_ready;
  blk_hist_t blk_pkt;
  block_assembler #(.MAX_CX(MAX_CX)) u_blkasm (
    .clk, .rst_n,
    .in_valid(cell_valid), .in_pkt(cell_pkt), .in_ready(cell_ready),
    .out_valid(blk_valid), .out_pkt(blk_pkt), .out_ready(blk_ready)
  );

  logic norm_valid, norm_ready;
  feat_pkt_t norm_pkt;
  hist_normalizer u_norm (
    .clk, .rst_n,
    .in_valid(blk_valid), .in_pkt(blk_pkt), .in_ready(blk_ready),
    .out_valid(norm_valid), .out_pkt(norm_pkt), .out_ready(norm_ready)
  );

  // feature MUX and the shared-feature handshake
  logic svm_valid, svm_ready;
  feat_pkt_t svm_pkt;
  assign norm_ready     = (feat_src_peer || svm_ready) && (!peer_uses_our_feat || peer_svm_ready);
  assign feat_out_valid = norm_valid;
  assign feat_out_pkt   = norm_pkt;
  assign feat_out_fire  = norm_valid && norm_ready;
  assign uses_peer_feat = feat_src_peer;
  assign svm_ready_out  = svm_ready;
  assign svm_valid      = feat_src_peer ? (feat_in_valid && feat_in_fire) : (norm_valid && norm_ready);
  assign svm_pkt        = feat_src_peer ? feat_in_pkt : norm_pkt;

  logic det_valid, det_pop;
  det_t det;
  logic [31:0] n_early_det, n_early_rej, n_final;
  svm_classifier #(.MAX_BX(MAX_CX - 1)) u_svm (
    .clk, .rst_n, .mode,
    .blk_cols(cells_x - 1'b1), .blk_rows(cells_y - 1'b1),
    .ec_en, .thr_det, .thr_rej, .final_thr,
    .coef_we, .coef_pe, .coef_idx, .coef_data,
    .feat_valid(svm_valid), .feat_pkt(svm_pkt), .feat_ready(svm_ready),
    .peer_out_valid(xfer_out_valid), .peer_out(xfer_out),
    .peer_in_valid(xfer_in_valid), .peer_in(xfer_in),
    .det_valid, .det, .det_ready(det_pop),
    .n_early_det, .n_early_rej, .n_final
  );

  core_controller u_ctrl (
    .clk, .rst_n,
    .reg_we, .reg_re, .reg_addr, .reg_wdata, .reg_rdata,
    .frame_start, .mode, .feat_src_peer, .extract_en, .ec_en,
    .cells_x, .cells_y, .thr_det, .thr_rej, .final_thr,
    .coef_we, .coef_pe, .coef_idx, .coef_data,
    .svm_accept(svm_valid && svm_ready), .svm_bx(svm_pkt.bx), .svm_by(svm_pkt.by),
    .svm_idle(svm_ready),
    .det_valid, .det, .det_pop,
    .n_early_det, .n_early_rej, .n_final,
    .busy, .irq
  );
endmodule
