// svm_classifier: detection-window-size scalable SVM with early classification.
//
// Main idea (from the source description): instead of scanning window by
// window, every block feature is used once for all windows that contain it.
// A 15x8 array of MACs holds the partial sums of those windows; MAC (k,j)
// of a chain holds the window whose block at row k, column j is the block
// being processed. When the scan moves one block to the right every chain
// shifts by one MAC; the partial sum leaving the last MAC of chain k has
// finished window row k and is parked in the intermediate-result SRAM
// until the scan reaches the next block row, where it enters chain k+1.
// With 64x128 windows (7x15 blocks) all 105 windows that share a block are
// computed together.
//
// Dataflow modes (configuration register, as in the description):
//   MODE_VERT    15 chains of 7 MACs along the array rows (64x128 window)
//   MODE_HORZ     7 chains of 15 MACs along the array columns (128x64)
//   MODE_SQ_HEAD  8 chains of 15 MACs, rows 0..7 of a 128x128 window; the
//                 partial sums leaving the last chain go to the other core
//   MODE_SQ_TAIL  7 chains of 15 MACs, rows 8..14 of a 128x128 window; the
//                 first chain starts from the sums received from the other core
// In every mode the coefficient of MAC p for feature element i is byte p of
// coefficient word i, so the host lays the coefficients out for the mode.
//
// Early classification (description): each time a partial sum leaves a
// chain (window rows 0..13, i.e. 14 times per window) it is compared with a
// pair of thresholds. Above thr_det[r] the window is reported as detected
// early, below thr_rej[r] it is rejected; either way it is marked dead and
// its remaining MAC work is skipped. A sum leaving the last window row is
// compared with final_thr. Windows that do not fit inside the frame
// (blk_cols x blk_rows blocks) enter the array dead. Reports (window origin in blocks, score, early
// flag) go to a result queue.
//
// Timing per block: accept (1) + load/shift (1) + 36 MAC cycles + evaluate
// (1) + one cycle per report, i.e. 39 cycles when nothing is reported.
module svm_classifier
  import hog_pkg::*;
#(
  parameter int unsigned MAX_BX = 239,  // blocks per row (1920/8 - 1)
  parameter int unsigned QDEPTH = 16    // result queue entries
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // configuration
  input  svm_mode_e                 mode,
  input  logic [CRD_W-1:0]          blk_cols,   // blocks per row of the frame
  input  logic [CRD_W-1:0]          blk_rows,   // block rows of the frame
  input  logic                      ec_en,
  input  logic signed [ACC_W-1:0]   thr_det [NTHR],
  input  logic signed [ACC_W-1:0]   thr_rej [NTHR],
  input  logic signed [ACC_W-1:0]   final_thr,
  // coefficient load
  input  logic                      coef_we,
  input  logic [$clog2(NPE)-1:0]    coef_pe,
  input  logic [5:0]                coef_idx,
  input  logic signed [COEF_W-1:0]  coef_data,
  // block features
  input  logic                      feat_valid,
  input  feat_pkt_t                 feat_pkt,
  output logic                      feat_ready,
  // intermediate classification results to / from the other core
  output logic                      peer_out_valid,
  output xfer_t                     peer_out,
  input  logic                      peer_in_valid,
  input  xfer_t                     peer_in,
  // detection results
  output logic                      det_valid,
  output det_t                      det,
  input  logic                      det_ready,
  // activity counters (free running)
  output logic [31:0]               n_early_det,
  output logic [31:0]               n_early_rej,
  output logic [31:0]               n_final
);
  localparam int unsigned AW   = $clog2(MAX_BX);
  localparam int unsigned PSW  = ACC_W + 1;
  localparam int unsigned NMID = NTHR - 1;       // parked chain outputs per column

  typedef enum logic [2:0] {V_IDLE, V_LOAD, V_MAC, V_EXIT, V_REPORT} st_e;
  st_e st;

  // ---- mode decoding ----
  logic [4:0] nch, len, row_off, win_rows;
  always_comb begin
    case (mode)
      MODE_VERT:    begin nch = 5'd15; len = 5'd7;  row_off = 5'd0; win_rows = 5'd15; end
      MODE_HORZ:    begin nch = 5'd7;  len = 5'd15; row_off = 5'd0; win_rows = 5'd7;  end
      MODE_SQ_HEAD: begin nch = 5'd8;  len = 5'd15; row_off = 5'd0; win_rows = 5'd15; end
      default:      begin nch = 5'd7;  len = 5'd15; row_off = 5'd8; win_rows = 5'd15; end
    endcase
  end
  wire vert = (mode == MODE_VERT);

  // ---- current block ----
  feat_pkt_t blk;
  logic [5:0] idx;
  assign feat_ready = (st == V_IDLE);
  wire accept = feat_valid && feat_ready;

  // ---- memories ----
  logic [NMID*PSW-1:0] mid_rd, mid_wr;
  logic                mid_we;
  logic [AW-1:0]       exit_wx;
  logic [PSW-1:0]      init_rd;
  logic [NPE-1:0][COEF_W-1:0] coef_rd;

  sram_1r1w #(.WIDTH(NMID * PSW), .DEPTH(MAX_BX)) u_mid_sram (
    .clk, .we(mid_we), .waddr(exit_wx), .wdata(mid_wr),
    .re(accept), .raddr(AW'(feat_pkt.bx)), .rdata(mid_rd)
  );

  sram_1r1w #(.WIDTH(PSW), .DEPTH(MAX_BX)) u_init_sram (
    .clk, .we(peer_in_valid), .waddr(AW'(peer_in.wx)), .wdata({peer_in.alive, peer_in.acc}),
    .re(accept), .raddr(AW'(feat_pkt.bx)), .rdata(init_rd)
  );

  wire coef_re = (st == V_LOAD) || (st == V_MAC);
  wire [5:0] coef_ridx = (st == V_LOAD) ? 6'd0 : idx + 1'b1;
  svm_coef_sram u_coef (
    .clk, .we(coef_we), .wpe(coef_pe), .widx(coef_idx), .wdata(coef_data),
    .re(coef_re), .ridx(coef_ridx), .rdata(coef_rd)
  );

  // ---- chain heads: what enters MAC position 0 of chain k ----
  psum_t head [ARR_ROWS];
  always_comb begin
    for (int k = 0; k < ARR_ROWS; k++) begin
      logic ok;
      // the window entering here, origin (bx, by-row_off-k), lies inside the frame
      ok = (32'(blk.by) >= 32'(row_off) + 32'(k))
        && (32'(blk.by) + 32'(win_rows) <= 32'(blk_rows) + 32'(row_off) + 32'(k))
        && (32'(blk.bx) + 32'(len) <= 32'(blk_cols));
      if (k == 0) begin
        if (mode == MODE_SQ_TAIL) begin
          head[k].alive = init_rd[PSW-1] && ok;
          head[k].acc   = init_rd[ACC_W-1:0];
        end else begin
          head[k].alive = ok;
          head[k].acc   = '0;
        end
      end else begin
        head[k].alive = mid_rd[(k-1)*PSW + ACC_W] && ok;
        head[k].acc   = mid_rd[(k-1)*PSW +: ACC_W];
      end
    end
  end

  // ---- the MAC array ----
  psum_t psum [ARR_ROWS][ARR_COLS];
  wire   do_load = (st == V_LOAD);
  wire   do_mac  = (st == V_MAC);

  for (genvar r = 0; r < ARR_ROWS; r++) begin : g_row
    for (genvar c = 0; c < ARR_COLS; c++) begin : g_col
      psum_t in_val;
      logic  used;
      always_comb begin
        if (vert) begin
          used   = (c < 7);
          in_val = (c == 0) ? head[r] : psum[r][(c == 0) ? 0 : c - 1];
        end else begin
          used   = (5'(c) < nch);
          in_val = (r == 0) ? head[c] : psum[(r == 0) ? 0 : r - 1][c];
        end
        if (!used) in_val.alive = 1'b0;
      end
      svm_mac u_mac (
        .clk, .rst_n,
        .load(do_load), .load_val(in_val),
        .mac_en(do_mac && used),
        .feat(blk.f[idx]),
        .coef(coef_rd[r * ARR_COLS + c]),
        .psum(psum[r][c])
      );
    end
  end

  // ---- chain tails and their evaluation ----
  psum_t tail [ARR_ROWS];
  always_comb begin
    for (int k = 0; k < ARR_ROWS; k++) begin
      if (vert) tail[k] = psum[k][6];
      else      tail[k] = (k < ARR_COLS) ? psum[ARR_ROWS-1][(k < ARR_COLS) ? k : 0] : '0;
    end
  end

  wire exit_ok = (32'(blk.bx) + 1 >= 32'(len));   // window origin wx >= 0
  assign exit_wx = AW'(32'(blk.bx) + 1 - 32'(len));

  logic [ARR_ROWS-1:0] rep_mask, ed_mask, er_mask, fin_mask;
  logic [ARR_ROWS-1:0] new_alive;
  always_comb begin
    rep_mask = '0; ed_mask = '0; er_mask = '0; fin_mask = '0;
    for (int k = 0; k < ARR_ROWS; k++) begin
      int r;
      r = int'(row_off) + k;
      new_alive[k] = tail[k].alive;
      if (k < int'(nch) && exit_ok && tail[k].alive) begin
        if (k == int'(nch) - 1 && mode != MODE_SQ_HEAD) begin
          if (tail[k].acc > final_thr) begin rep_mask[k] = 1'b1; fin_mask[k] = 1'b1; end
        end else if (ec_en && r < NTHR) begin
          if (tail[k].acc > thr_det[(r < NTHR) ? r : 0]) begin
            rep_mask[k] = 1'b1; ed_mask[k] = 1'b1; new_alive[k] = 1'b0;
          end else if (tail[k].acc < thr_rej[(r < NTHR) ? r : 0]) begin
            er_mask[k] = 1'b1; new_alive[k] = 1'b0;
          end
        end
      end
    end
    for (int k = 0; k < NMID; k++)
      mid_wr[k*PSW +: PSW] = {new_alive[k], tail[k].acc};
  end

  assign mid_we = (st == V_EXIT) && exit_ok;

  // hand-over to the other core (square windows)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      peer_out_valid <= 1'b0;
      peer_out <= '0;
    end else begin
      peer_out_valid <= (st == V_EXIT) && exit_ok && (mode == MODE_SQ_HEAD);
      peer_out.wx    <= CRD_W'(exit_wx);
      peer_out.alive <= new_alive[7];
      peer_out.acc   <= tail[7].acc;
    end
  end

  // ---- reports ----
  logic [ARR_ROWS-1:0] pend, pend_early;
  logic signed [ACC_W-1:0] score_q [ARR_ROWS];
  logic [CRD_W-1:0] rep_wx, rep_by;
  logic [3:0] sel;
  always_comb begin
    sel = '0;
    for (int k = ARR_ROWS - 1; k >= 0; k--)
      if (pend[k]) sel = 4'(k);
  end

  det_t q_in;
  logic q_wr_ready;
  logic [$clog2(QDEPTH+1)-1:0] q_count;
  always_comb begin
    q_in.wx    = rep_wx;
    q_in.wy    = rep_by - CRD_W'(row_off) - CRD_W'(sel);
    q_in.early = pend_early[sel];
    q_in.score = score_q[sel];
  end
  wire q_push = (st == V_REPORT) && (pend != '0) && q_wr_ready;

  sync_fifo #(.WIDTH($bits(det_t)), .DEPTH(QDEPTH)) u_resq (
    .clk, .rst_n, .clear(1'b0),
    .wr_valid(q_push), .wr_data(q_in), .wr_ready(q_wr_ready),
    .rd_valid(det_valid), .rd_data(det), .rd_ready(det_ready),
    .count(q_count)
  );

  // ---- control ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= V_IDLE; blk <= '0; idx <= '0;
      pend <= '0; pend_early <= '0; rep_wx <= '0; rep_by <= '0;
      for (int k = 0; k < ARR_ROWS; k++) score_q[k] <= '0;
      n_early_det <= '0; n_early_rej <= '0; n_final <= '0;
    end else begin
      case (st)
        V_IDLE: if (accept) begin blk <= feat_pkt; st <= V_LOAD; end
        V_LOAD: begin idx <= '0; st <= V_MAC; end
        V_MAC: begin
          if (idx == 6'(BLK_DIM - 1)) st <= V_EXIT;
          else idx <= idx + 1'b1;
        end
        V_EXIT: begin
          pend       <= rep_mask;
          pend_early <= ed_mask;
          rep_wx     <= CRD_W'(exit_wx);
          rep_by     <= blk.by;
          for (int k = 0; k < ARR_ROWS; k++) score_q[k] <= tail[k].acc;
          n_early_det <= n_early_det + 32'($countones(ed_mask));
          n_early_rej <= n_early_rej + 32'($countones(er_mask));
          n_final     <= n_final + 32'($countones(fin_mask));
          st <= (rep_mask != '0) ? V_REPORT : V_IDLE;
        end
        V_REPORT: begin
          if (pend == '0) st <= V_IDLE;
          else if (q_push) pend[sel] <= 1'b0;
        end
        default: st <= V_IDLE;
      endcase
    end
  end
endmodule
