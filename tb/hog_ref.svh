// hog_ref.svh: window-by-window SVM reference used by the core and chip
// testbenches (included inside the testbench module, after importing
// hog_pkg).
//
// Holds the block features of one frame (as produced by a core's
// normaliser), the coefficients of one window shape and the thresholds, and
// computes, window by window, every row partial sum and the reports the
// detector must produce: an early detection at the first window row whose
// partial sum is above its detection threshold, nothing after the first row
// below its rejection threshold, and a final detection when the full sum is
// above the final threshold. It also maps a window coefficient (row, column)
// to the MAC that holds it in each dataflow mode.
  class hog_ref;
    int bw, bh;                       // blocks per row, block rows
    int unsigned feat[];              // feature (by*bw + bx)*36 + i
    int w [15][15][BLK_DIM];          // window coefficients [row][col][elem]
    longint thr_det [NTHR];
    longint thr_rej [NTHR];
    longint final_thr;
    bit ec;

    function new(int bw_, int bh_);
      bw = bw_; bh = bh_;
      feat = new[bw * bh * BLK_DIM];
      ec = 0; final_thr = 0;
      for (int r = 0; r < NTHR; r++) begin thr_det[r] = 64'sd1 << 40; thr_rej[r] = -(64'sd1 << 40); end
    endfunction

    function void set_feat(feat_pkt_t p);
      int base;
      logic [BLK_DIM-1:0][FEAT_W-1:0] v;
      base = (int'(p.by) * bw + int'(p.bx)) * BLK_DIM;
      v = p.f;
      for (int i = 0; i < BLK_DIM; i++) feat[base + i] = int'(v[i]);
    endfunction

    function longint row_sum(int wx, int wy, int r, int wc);
      longint s;
      s = 0;
      for (int c = 0; c < wc; c++)
        for (int i = 0; i < BLK_DIM; i++)
          s += longint'(feat[((wy + r) * bw + wx + c) * BLK_DIM + i]) * longint'(w[r][c][i]);
      return s;
    endfunction

    // partial sums after window row r of every window, sorted, for threshold picking
    function void sums_at(int wc, int wr, int r, ref longint q[$]);
      q.delete();
      for (int wy = 0; wy + wr <= bh; wy++)
        for (int wx = 0; wx + wc <= bw; wx++) begin
          longint s;
          s = 0;
          for (int k = 0; k <= r; k++) s += row_sum(wx, wy, k, wc);
          q.push_back(s + (64'sd1 << 40));
        end
      q.sort();
      foreach (q[k]) q[k] = q[k] - (64'sd1 << 40);
    endfunction

    function void expected(int wc, int wr, ref det_t q[$]);
      q.delete();
      for (int wy = 0; wy + wr <= bh; wy++)
        for (int wx = 0; wx + wc <= bw; wx++) begin
          longint s;
          bit decided;
          det_t d;
          s = 0; decided = 0;
          d.wx = CRD_W'(wx); d.wy = CRD_W'(wy);
          for (int r = 0; r < wr && !decided; r++) begin
            s += row_sum(wx, wy, r, wc);
            if (r == wr - 1) begin
              if (s > final_thr) begin d.early = 0; d.score = ACC_W'(s); q.push_back(d); end
            end else if (ec && s > thr_det[r]) begin
              d.early = 1; d.score = ACC_W'(s); q.push_back(d); decided = 1;
            end else if (ec && s < thr_rej[r]) begin
              decided = 1;
            end
          end
        end
    endfunction
  endclass

  // MAC (and core, for square windows) that holds window coefficient (r, c)
  function automatic int pe_of(svm_mode_e m, int r, int c, output bit core1);
    core1 = 0;
    if (m == MODE_VERT) return r * ARR_COLS + c;
    if (m == MODE_HORZ || r < 8) return c * ARR_COLS + r;
    core1 = 1;
    return c * ARR_COLS + (r - 8);
  endfunction

  // compare two report lists as sets; returns the number of differences
  function automatic int compare(string tag, ref det_t got[$], ref det_t exp_q[$]);
    int bad;
    bad = 0;
    if (got.size() != exp_q.size()) begin
      $display("%s: %0d reports, expected %0d", tag, got.size(), exp_q.size());
      bad++;
    end
    foreach (exp_q[e]) begin
      bit found;
      found = 0;
      foreach (got[g]) if (got[g] == exp_q[e]) found = 1;
      if (!found) begin
        bad++;
        if (bad < 6) $display("%s: missing report wx=%0d wy=%0d early=%0d score=%0d", tag,
                              exp_q[e].wx, exp_q[e].wy, exp_q[e].early, exp_q[e].score);
      end
    end
    return bad;
  endfunction
