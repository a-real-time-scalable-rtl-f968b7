// hog_vlsi: dual-core HOG object detection accelerator (top level).
//
// Two identical HOG feature extraction cores sit between a CPU interface
// and a memory interface. The CPU loads SVM coefficients and thresholds
// into each core, sets each core's configuration flags, starts frames and
// reads detection results; the image arrives as 32-bit pixel words over the
// memory bus. The cores are cross-connected in both directions for HOG
// features (feature sharing) and for intermediate classification results
// (square windows split over both MAC arrays), as in the block diagram of
// the source description.
//
// Typical uses, all set by configuration registers:
//  - one object class, image split in two halves, each core processes one;
//  - two object classes: core 0 extracts features, core 1 switches its
//    extraction off and classifies core 0's features with its own
//    coefficients (e.g. people 64x128 in core 0, cars 128x64 in core 1);
//  - square 128x128 windows: core 0 runs window rows 0..7, core 1 rows 8..14.
// Clock generation (a PLL on the real chip) is outside: clk is an input.
module hog_vlsi
  import hog_pkg::*;
#(
  parameter int unsigned IMG_W = 1920,   // widest frame row in pixels
  parameter int unsigned ITER  = 8       // CORDIC iterations
) (
  input  logic         clk,
  input  logic         rst_n,
  // CPU bus
  input  logic         cpu_cs,
  input  logic         cpu_we,
  input  logic [15:0]  cpu_addr,
  input  logic [31:0]  cpu_wdata,
  output logic [31:0]  cpu_rdata,
  output logic         cpu_rvalid,
  output logic         cpu_irq,
  // memory bus
  input  logic         mem_valid,
  input  logic         mem_core,
  input  logic [31:0]  mem_data,
  output logic         mem_ready,
  // status
  output logic [1:0]   core_busy
);
  logic [1:0]        reg_we, reg_re, core_irq;
  logic [14:0]       reg_addr;
  logic [31:0]       reg_wdata;
  logic [1:0][31:0]  reg_rdata;
  logic [1:0]        pix_valid, pix_ready;
  logic [31:0]       pix_data;

  cpu_if u_cpu_if (
    .clk, .rst_n, .cpu_cs, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rdata, .cpu_rvalid, .cpu_irq,
    .reg_we, .reg_re, .reg_addr, .reg_wdata, .reg_rdata, .core_irq
  );

  mem_if u_mem_if (
    .clk, .rst_n, .mem_valid, .mem_core, .mem_data, .mem_ready,
    .pix_valid, .pix_data, .pix_ready
  );

  logic [1:0]      f_valid, f_fire, f_uses_peer, f_svm_ready, x_valid;
  feat_pkt_t       f_pkt [2];
  xfer_t           x_pkt [2];

  for (genvar c = 0; c < 2; c++) begin : g_core
    hog_core #(.IMG_W(IMG_W), .ITER(ITER)) u_core (
      .clk, .rst_n,
      .reg_we(reg_we[c]), .reg_re(reg_re[c]), .reg_addr, .reg_wdata,
      .reg_rdata(reg_rdata[c]), .irq(core_irq[c]), .busy(core_busy[c]),
      .pix_valid(pix_valid[c]), .pix_data, .pix_ready(pix_ready[c]),
      .feat_out_valid(f_valid[c]), .feat_out_pkt(f_pkt[c]), .feat_out_fire(f_fire[c]),
      .uses_peer_feat(f_uses_peer[c]), .svm_ready_out(f_svm_ready[c]),
      .feat_in_valid(f_valid[1-c]), .feat_in_pkt(f_pkt[1-c]), .feat_in_fire(f_fire[1-c]),
      .peer_uses_our_feat(f_uses_peer[1-c]), .peer_svm_ready(f_svm_ready[1-c]),
      .xfer_out_valid(x_valid[c]), .xfer_out(x_pkt[c]),
      .xfer_in_valid(x_valid[1-c]), .xfer_in(x_pkt[1-c])
    );
  end
endmodule
