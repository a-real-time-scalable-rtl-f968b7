// core_controller: configuration registers and frame sequencing of one core.
//
// The external CPU programs each core through these registers (word
// addresses inside the core's half of the CPU address space):
//   0x000 CTRL      [0] start (write 1), [2:1] SVM dataflow mode,
//                   [3] take HOG features from the other core,
//                   [4] feature extraction enable, [5] early classification enable
//   0x001 SIZE      [7:0] cells per row, [23:16] cell rows of the frame
//   0x002 STATUS    [0] busy, [1] done (cleared by start), [2] result waiting
//   0x003 RES_POS   [31] early, [30] valid, [23:16] wy, [7:0] wx  (head result)
//   0x004 RES_SCORE signed score of the head result; reading it removes it
//   0x005 FINAL_THR final SVM threshold
//   0x006..0x008    counters: early detections, early rejections, final detections
//   0x010+r         early detection threshold of window row r (0..14)
//   0x020+r         early rejection threshold of window row r (0..14)
//   0x4000 | pe<<6 | i  SVM coefficient of MAC pe, feature element i (write only)
// The description says the CPU controls the chip, loads the trained
// parameters into each core and sets the configuration register flags that
// select the MUX input and the MAC dataflow; the register map itself is this
// design's own.
//
// A frame ends when the classifier has taken the last block of the frame
// and is idle again; done then sets and irq rises. irq is also high while a
// detection result waits. Reads return data one cycle after reg_re.
module core_controller
  import hog_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  // register bus
  input  logic                     reg_we,
  input  logic                     reg_re,
  input  logic [14:0]              reg_addr,
  input  logic [31:0]              reg_wdata,
  output logic [31:0]              reg_rdata,
  // configuration
  output logic                     frame_start,
  output svm_mode_e                mode,
  output logic                     feat_src_peer,
  output logic                     extract_en,
  output logic                     ec_en,
  output logic [CRD_W-1:0]         cells_x,
  output logic [CRD_W-1:0]         cells_y,
  output logic signed [ACC_W-1:0]  thr_det [NTHR],
  output logic signed [ACC_W-1:0]  thr_rej [NTHR],
  output logic signed [ACC_W-1:0]  final_thr,
  output logic                     coef_we,
  output logic [$clog2(NPE)-1:0]   coef_pe,
  output logic [5:0]               coef_idx,
  output logic signed [COEF_W-1:0] coef_data,
  // status from the datapath
  input  logic                     svm_accept,
  input  logic [CRD_W-1:0]         svm_bx,
  input  logic [CRD_W-1:0]         svm_by,
  input  logic                     svm_idle,
  input  logic                     det_valid,
  input  det_t                     det,
  output logic                     det_pop,
  input  logic [31:0]              n_early_det,
  input  logic [31:0]              n_early_rej,
  input  logic [31:0]              n_final,
  output logic                     busy,
  output logic                     irq
);
  logic done, last_seen;

  wire is_coef = reg_addr[14];
  wire [7:0] ra = reg_addr[7:0];

  assign coef_we   = reg_we && is_coef;
  assign coef_pe   = reg_addr[12:6];
  assign coef_idx  = reg_addr[5:0];
  assign coef_data = reg_wdata[COEF_W-1:0];
  assign det_pop   = reg_re && !is_coef && ra == 8'h04 && det_valid;
  assign irq       = done || det_valid;

  wire last_blk = (svm_bx == cells_x - 8'd2) && (svm_by == cells_y - 8'd2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_start <= 1'b0; mode <= MODE_VERT; feat_src_peer <= 1'b0;
      extract_en <= 1'b1; ec_en <= 1'b1; cells_x <= '0; cells_y <= '0;
      final_thr <= '0; busy <= 1'b0; done <= 1'b0; last_seen <= 1'b0;
      for (int r = 0; r < NTHR; r++) begin
        thr_det[r] <= {1'b0, {(ACC_W-1){1'b1}}};     // never early-detect
        thr_rej[r] <= {1'b1, {(ACC_W-1){1'b0}}};     // never early-reject
      end
    end else begin
      frame_start <= 1'b0;
      if (reg_we && !is_coef) begin
        case (ra) inside
          8'h00: begin
            mode          <= svm_mode_e'(reg_wdata[2:1]);
            feat_src_peer <= reg_wdata[3];
            extract_en    <= reg_wdata[4];
            ec_en         <= reg_wdata[5];
            if (reg_wdata[0]) begin
              frame_start <= 1'b1;
              busy        <= 1'b1;
              done        <= 1'b0;
              last_seen   <= 1'b0;
            end
          end
          8'h01: begin cells_x <= reg_wdata[7:0]; cells_y <= reg_wdata[23:16]; end
          8'h05: final_thr <= reg_wdata[ACC_W-1:0];
          [8'h10:8'h1e]: thr_det[ra[3:0]] <= reg_wdata[ACC_W-1:0];
          [8'h20:8'h2e]: thr_rej[ra[3:0]] <= reg_wdata[ACC_W-1:0];
          default: ;
        endcase
      end
      if (busy && svm_accept && last_blk) last_seen <= 1'b1;
      if (busy && last_seen && svm_idle) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) reg_rdata <= '0;
    else if (reg_re) begin
      reg_rdata <= '0;
      if (!is_coef) begin
        case (ra) inside
          8'h00: reg_rdata <= {26'd0, ec_en, extract_en, feat_src_peer, mode, 1'b0};
          8'h01: reg_rdata <= {8'd0, cells_y, 8'd0, cells_x};
          8'h02: reg_rdata <= {29'd0, det_valid, done, busy};
          8'h03: reg_rdata <= {det.early, det_valid, 6'd0, det.wy, 8'd0, det.wx};
          8'h04: reg_rdata <= 32'(det.score);
          8'h05: reg_rdata <= 32'(final_thr);
          8'h06: reg_rdata <= n_early_det;
          8'h07: reg_rdata <= n_early_rej;
          8'h08: reg_rdata <= n_final;
          [8'h10:8'h1e]: reg_rdata <= 32'(thr_det[ra[3:0]]);
          [8'h20:8'h2e]: reg_rdata <= 32'(thr_rej[ra[3:0]]);
          default: ;
        endcase
      end
    end
  end
endmodule
