// tb_svm_classifier: runs random block features through the MAC array in
// the vertical (64x128), horizontal (128x64) and square (128x128, two
// arrays chained as head and tail) modes. A window-by-window reference
// computes every window's partial sums row by row, applies the same early
// thresholds (chosen from the reference sums so that early detection, early
// rejection and final detections all occur) and the final threshold, and the
// set of reports must match exactly (origin, score, early flag). Also
// checks the 39-cycle block time when no report is due.
module tb_svm_classifier;
  import hog_pkg::*;
  logic clk = 0, rst_n = 0;
  svm_mode_e mode0, mode1;
  logic ec_en = 1;
  logic signed [ACC_W-1:0] thr_det [NTHR], thr_rej [NTHR], final_thr;
  logic coef_we = 0;
  logic [6:0] coef_pe = 0;
  logic [5:0] coef_idx = 0;
  logic signed [7:0] coef_data = 0;
  logic feat_valid = 0, rdy0, rdy1;
  feat_pkt_t feat_pkt = '0;
  logic pv0, pv1;
  xfer_t po0, po1;
  logic dv0, dv1;
  det_t d0, d1;
  logic [31:0] ed0, er0, nf0, ed1, er1, nf1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // instance 0 feeds instance 1 in the square mode
  svm_classifier #(.MAX_BX(32)) u0 (
    .clk, .rst_n, .mode(mode0), .blk_cols(CRD_W'(bw_cfg)), .blk_rows(CRD_W'(bh_cfg)), .ec_en, .thr_det, .thr_rej, .final_thr,
    .coef_we(coef_we && !sel1), .coef_pe, .coef_idx, .coef_data,
    .feat_valid(feat_valid && rdy0 && rdy1), .feat_pkt, .feat_ready(rdy0),
    .peer_out_valid(pv0), .peer_out(po0), .peer_in_valid(pv1), .peer_in(po1),
    .det_valid(dv0), .det(d0), .det_ready(1'b1),
    .n_early_det(ed0), .n_early_rej(er0), .n_final(nf0));
  svm_classifier #(.MAX_BX(32)) u1 (
    .clk, .rst_n, .mode(mode1), .blk_cols(CRD_W'(bw_cfg)), .blk_rows(CRD_W'(bh_cfg)), .ec_en, .thr_det, .thr_rej, .final_thr,
    .coef_we(coef_we && sel1), .coef_pe, .coef_idx, .coef_data,
    .feat_valid(feat_valid && rdy0 && rdy1), .feat_pkt, .feat_ready(rdy1),
    .peer_out_valid(pv1), .peer_out(po1), .peer_in_valid(pv0), .peer_in(po0),
    .det_valid(dv1), .det(d1), .det_ready(1'b1),
    .n_early_det(ed1), .n_early_rej(er1), .n_final(nf1));
  logic sel1 = 0;
  int bw_cfg = 1, bh_cfg = 1;

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam int MB = 26;
  localparam longint OFS = 64'd1 << 40;   // keeps the sorted keys non-negative
  int unsigned f [MB][MB][BLK_DIM];
  int wgt [15][15][BLK_DIM];
  det_t got [$];
  det_t exp_q [$];

  always @(posedge clk) begin
    if (rst_n && dv0) got.push_back(d0);
    if (rst_n && dv1 && mode1 == MODE_SQ_TAIL) got.push_back(d1);
  end

  task automatic write_coef(input bit core1, input int pe, input int i, input int v);
    @(negedge clk);
    sel1 = core1; coef_we = 1; coef_pe = 7'(pe); coef_idx = 6'(i); coef_data = 8'(v);
    @(negedge clk) coef_we = 0;
  endtask

  // one frame of BW x BH blocks with a WC x WR window
  task automatic run(input svm_mode_e m, input int BW, input int BH, input int WC, input int WR);
    longint p [MB][MB][15];
    longint vals [$];
    int nwx, nwy, t0, t1, tmax;
    mode0 = m; mode1 = m;
    bw_cfg = BW; bh_cfg = BH;
    if (m == MODE_SQ_HEAD) mode1 = MODE_SQ_TAIL;
    // features and coefficients
    for (int x = 0; x < BW; x++) for (int y = 0; y < BH; y++) for (int i = 0; i < BLK_DIM; i++)
      f[x][y][i] = $urandom_range(60);
    for (int r = 0; r < WR; r++) for (int c = 0; c < WC; c++) for (int i = 0; i < BLK_DIM; i++) begin
      int pe;
      bit c1;
      wgt[r][c][i] = int'($urandom_range(255)) - 128;
      c1 = 0;
      if (m == MODE_VERT) pe = r * ARR_COLS + c;
      else if (m == MODE_HORZ || r < 8) pe = c * ARR_COLS + r;
      else begin c1 = 1; pe = c * ARR_COLS + (r - 8); end
      write_coef(c1, pe, i, wgt[r][c][i]);
    end
    // reference row partial sums
    nwx = BW - WC + 1; nwy = BH - WR + 1;
    for (int wx = 0; wx < nwx; wx++) for (int wy = 0; wy < nwy; wy++) begin
      longint s;
      s = 0;
      for (int r = 0; r < WR; r++) begin
        for (int c = 0; c < WC; c++) for (int i = 0; i < BLK_DIM; i++)
          s += longint'(f[wx+c][wy+r][i]) * longint'(wgt[r][c][i]);
        p[wx][wy][r] = s;
      end
    end
    // thresholds: early decisions at rows 2 and WR-3 from the spread of sums
    for (int r = 0; r < NTHR; r++) begin thr_det[r] = 27'sh3ffffff; thr_rej[r] = -27'sh3ffffff; end
    vals.delete();
    for (int wx = 0; wx < nwx; wx++) for (int wy = 0; wy < nwy; wy++) vals.push_back(p[wx][wy][2] + OFS);
    vals.sort();
    thr_det[2] = ACC_W'(vals[vals.size() * 9 / 10] - OFS);
    thr_rej[2] = ACC_W'(vals[vals.size() / 10] - OFS);
    vals.delete();
    for (int wx = 0; wx < nwx; wx++) for (int wy = 0; wy < nwy; wy++) vals.push_back(p[wx][wy][WR-3] + OFS);
    vals.sort();
    thr_det[WR-3] = ACC_W'(vals[vals.size() * 8 / 10] - OFS);
    thr_rej[WR-3] = ACC_W'(vals[vals.size() / 5] - OFS);
    vals.delete();
    for (int wx = 0; wx < nwx; wx++) for (int wy = 0; wy < nwy; wy++) vals.push_back(p[wx][wy][WR-1] + OFS);
    vals.sort();
    final_thr = ACC_W'(vals[vals.size() / 2] - OFS);
    $display("thr2 %0d %0d thrL %0d %0d final %0d n=%0d", thr_det[2], thr_rej[2], thr_det[WR-3], thr_rej[WR-3], final_thr, vals.size());
    // expected reports
    exp_q.delete();
    for (int wx = 0; wx < nwx; wx++) for (int wy = 0; wy < nwy; wy++) begin
      det_t d;
      bit decided;
      decided = 0;
      d.wx = CRD_W'(wx); d.wy = CRD_W'(wy);
      for (int r = 0; r < WR - 1 && !decided; r++) begin
        if (p[wx][wy][r] > longint'(thr_det[r])) begin
          d.early = 1; d.score = ACC_W'(p[wx][wy][r]); exp_q.push_back(d); decided = 1;
        end else if (p[wx][wy][r] < longint'(thr_rej[r])) decided = 1;
      end
      if (!decided && p[wx][wy][WR-1] > longint'(final_thr)) begin
        d.early = 0; d.score = ACC_W'(p[wx][wy][WR-1]); exp_q.push_back(d);
      end
    end
    // stream the blocks
    got.delete();
    tmax = 0;
    for (int y = 0; y < BH; y++) for (int x = 0; x < BW; x++) begin
      @(negedge clk);
      feat_valid = 1;
      feat_pkt.bx = CRD_W'(x); feat_pkt.by = CRD_W'(y);
      for (int i = 0; i < BLK_DIM; i++) feat_pkt.f[i] = FEAT_W'(f[x][y][i]);
      @(posedge clk);
      while (!(rdy0 && rdy1)) @(posedge clk);
      t0 = t1; t1 = $time / 10;
      if (y == 0 && x > 1 && t1 - t0 > tmax) tmax = t1 - t0;
    end
    @(negedge clk) feat_valid = 0;
    repeat (80) @(posedge clk);
    // block time in the first block row, where no window can be reported
    checks++;
    if (tmax != 39) begin failures++; $display("block time %0d cycles, expected 39", tmax); end
    // compare report sets
    checks++;
    if (got.size() != exp_q.size()) begin
      failures++; $display("mode %0d: %0d reports, expected %0d", m, got.size(), exp_q.size());
    end
    foreach (exp_q[e]) begin
      bit found;
      found = 0;
      foreach (got[g]) if (got[g] == exp_q[e]) found = 1;
      checks++;
      if (!found) begin
        failures++;
        $display("mode %0d: missing report wx=%0d wy=%0d early=%0d score=%0d", m,
                 exp_q[e].wx, exp_q[e].wy, exp_q[e].early, exp_q[e].score);
      end
    end
    $display("mode %0d: %0d reports, early det %0d/%0d rej %0d/%0d final %0d/%0d", m, got.size(),
             ed0, ed1, er0, er1, nf0, nf1);
  endtask

  initial begin
    mode0 = MODE_VERT; mode1 = MODE_VERT;
    final_thr = '0;
    for (int r = 0; r < NTHR; r++) begin thr_det[r] = '0; thr_rej[r] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(MODE_VERT, 14, 24, 7, 15);
    run(MODE_HORZ, 24, 14, 15, 7);
    run(MODE_SQ_HEAD, 20, 20, 15, 15);
    checks++;
    if (ed0 == 0 || er0 == 0 || nf0 == 0 || nf1 == 0 || er1 == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
