// tb_hog_vlsi: chip-level end-to-end test through the CPU and memory buses.
//
// A 192x176 synthetic image (24x22 cells) is used in three configurations,
// all driven only through the chip's pins:
//  A. dual core, one object class: core 0 gets cell rows 0..17, core 1 cell
//     rows 4..21 (pixel words interleaved on the memory bus, each tagged
//     with its core); both classify 64x128 windows. A calibration frame with
//     early classification off records each core's block features; the
//     thresholds are then picked from the reference partial sums and the
//     frame is run again.
//  B. feature sharing, two object classes: core 0 extracts features of
//     cell rows 0..17 and classifies 64x128 windows, core 1 has extraction
//     off and classifies core 0's features as 128x64 windows with its own
//     coefficients.
//  C. square 128x128 windows: core 0 runs window rows 0..7 (head), passes
//     partial sums to core 1, which runs rows 8..14 (tail) on core 0's
//     features.
// In every case the reports read from the result registers must equal the
// reference model's, window for window. The test counts each mechanism and
// fails if one never happens: early detection, early rejection, final
// detection, memory-bus back-pressure, pixel words routed to each core,
// shared feature transfers, partial-sum transfers between the cores, the
// interrupt line, and each of the four array modes.
// CPU reads take effect two cycles after the request (cpu_rvalid).
module tb_hog_vlsi;
  import hog_pkg::*;
  `include "hog_ref.svh"
  localparam int W = 192, H = 176, CX = W / 8;
  localparam int RCY = 18;                  // cell rows per core region
  localparam int OFF1 = 4;                  // first cell row of core 1 in case A
  logic clk = 0, rst_n = 0;
  logic cpu_cs = 0, cpu_we = 0;
  logic [15:0] cpu_addr = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata;
  logic cpu_rvalid, cpu_irq;
  logic mem_valid = 0, mem_core = 0;
  logic [31:0] mem_data = 0;
  logic mem_ready;
  logic [1:0] core_busy;
  int checks = 0, failures = 0, cycle = 0;
  int n_stall = 0, n_irq = 0, n_share = 0, n_xfer = 0;
  int n_word [2];
  int n_mode [4];
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  hog_vlsi #(.IMG_W(256)) dut (
    .clk, .rst_n, .cpu_cs, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rdata, .cpu_rvalid, .cpu_irq,
    .mem_valid, .mem_core, .mem_data, .mem_ready, .core_busy);

  hog_ref ref0, ref1;
  bit share_mode = 0;
  det_t got0 [$], got1 [$], exp_q [$];

  // feature capture and mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (dut.g_core[0].u_core.feat_out_fire) ref0.set_feat(dut.g_core[0].u_core.feat_out_pkt);
    if (dut.g_core[1].u_core.feat_out_fire && !share_mode) ref1.set_feat(dut.g_core[1].u_core.feat_out_pkt);
    if (mem_valid && !mem_ready) n_stall++;
    if (mem_valid && mem_ready) n_word[mem_core]++;
    if (cpu_irq) n_irq++;
    if (dut.g_core[0].u_core.feat_out_fire && dut.g_core[1].u_core.uses_peer_feat) n_share++;
    if (dut.x_valid[0]) n_xfer++;
  end

  initial begin
    #80000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [7:0] pix(int x, int y);
    int v;
    v = ((x - 90) * (x - 90) + 2 * (y - 80) * (y - 80)) / 29 + ((x / 16 + y / 24) % 2) * 80;
    return 8'(v + (x * 5 ^ y * 3) % 11);
  endfunction

  task automatic wr(input bit core, input int a, input logic [31:0] d);
    @(negedge clk); cpu_cs = 1; cpu_we = 1; cpu_addr = {core, 15'(a)}; cpu_wdata = d;
    @(negedge clk); cpu_cs = 0; cpu_we = 0;
  endtask
  task automatic rd(input bit core, input int a, output logic [31:0] d);
    @(negedge clk); cpu_cs = 1; cpu_we = 0; cpu_addr = {core, 15'(a)};
    @(negedge clk); cpu_cs = 0;
    while (!cpu_rvalid) @(negedge clk);
    d = cpu_rdata;
  endtask

  // random coefficients for a window shape; square windows are split over both cores
  task automatic load_coefs(hog_ref rm, svm_mode_e m, bit core, int wc, int wr_);
    for (int r = 0; r < wr_; r++) for (int c = 0; c < wc; c++) for (int i = 0; i < BLK_DIM; i++) begin
      bit c1;
      int pe;
      rm.w[r][c][i] = int'($urandom_range(255)) - 128;
      pe = pe_of(m, r, c, c1);
      wr(core | c1, 32'h4000 | (pe << 6) | i, 32'(rm.w[r][c][i]));
    end
  endtask

  function automatic longint clampv(longint v);
    if (v > 64'sd30000000) return 64'sd30000000;
    if (v < -64'sd30000000) return -64'sd30000000;
    return v;
  endfunction

  // thresholds at two window rows and the final one, picked from the reference sums
  task automatic set_thr(hog_ref rm, bit c_lo, bit c_hi, int wc, int wr_, int r1, int r2);
    longint q [$];
    for (int r = 0; r < NTHR; r++) begin rm.thr_det[r] = 64'sd1 << 40; rm.thr_rej[r] = -(64'sd1 << 40); end
    rm.sums_at(wc, wr_, r1, q);
    rm.thr_det[r1] = q[q.size() * 85 / 100]; rm.thr_rej[r1] = q[q.size() / 8];
    rm.sums_at(wc, wr_, r2, q);
    rm.thr_det[r2] = q[q.size() * 8 / 10]; rm.thr_rej[r2] = q[q.size() / 4];
    rm.sums_at(wc, wr_, wr_ - 1, q);
    rm.final_thr = q[q.size() / 2];
    rm.ec = 1;
    for (int k = int'(c_lo); k <= int'(c_hi); k++) begin
      for (int r = 0; r < NTHR; r++) begin
        wr(k[0], 16 + r, 32'(clampv(rm.thr_det[r])));
        wr(k[0], 32 + r, 32'(clampv(rm.thr_rej[r])));
      end
      wr(k[0], 5, 32'(rm.final_thr));
    end
  endtask

  function automatic logic [31:0] ctrl(svm_mode_e m, bit peer, bit extract, bit ec);
    return {26'd0, ec, extract, peer, m, 1'b1};
  endfunction

  // stream the image regions of the cores in use (two interleaved streams when
  // both extract) and collect reports of both cores until both are done
  task automatic run(bit two_streams, int off1);
    logic [31:0] d, pos;
    bit fin [2];
    got0.delete(); got1.delete();
    fork
      for (int y = 0; y < RCY * 8; y++)
        for (int c = 0; c < (two_streams ? 2 : 1); c++)
          for (int x = 0; x < W; x += 4) begin
            int yy;
            yy = y + (c == 1 ? off1 * 8 : 0);
            @(negedge clk);
            mem_valid = 1; mem_core = c[0];
            mem_data = {pix(x+3,yy), pix(x+2,yy), pix(x+1,yy), pix(x,yy)};
            @(posedge clk); while (!mem_ready) @(posedge clk);
            #1 mem_valid = 0;
          end
      begin
        fin[0] = 0; fin[1] = 0;
        while (!(fin[0] && fin[1])) begin
          for (int c = 0; c < 2; c++) begin
            rd(c[0], 2, d);
            if (d[2]) begin
              det_t r;
              rd(c[0], 3, pos); rd(c[0], 4, d);
              r.wx = pos[7:0]; r.wy = pos[23:16]; r.early = pos[31]; r.score = ACC_W'(d);
              if (c == 0) got0.push_back(r); else got1.push_back(r);
            end else if (d[1]) fin[c] = 1;
          end
        end
      end
    join
  endtask

  task automatic check_counters(bit core, string tag);
    logic [31:0] e, j, f;
    rd(core, 6, e); rd(core, 7, j); rd(core, 8, f);
    $display("%s: early det %0d, early rej %0d, final %0d", tag, e, j, f);
    checks++; if (e == 0) begin failures++; $display("%s: no early detection", tag); end
    checks++; if (j == 0) begin failures++; $display("%s: no early rejection", tag); end
    checks++; if (f == 0) begin failures++; $display("%s: no final detection", tag); end
  endtask

  task automatic expect_reports(string tag, det_t got[$], hog_ref rm, int wc, int wr_);
    rm.expected(wc, wr_, exp_q);
    checks++;
    failures += (compare(tag, got, exp_q) != 0);
    $display("%s: %0d reports", tag, got.size());
  endtask

  initial begin
    det_t both [$];
    ref0 = new(CX - 1, RCY - 1);
    ref1 = new(CX - 1, RCY - 1);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2; c++) wr(c[0], 1, {8'd0, 8'(RCY), 8'd0, 8'(CX)});

    // A: image split over both cores, 64x128 windows
    load_coefs(ref0, MODE_VERT, 0, 7, 15);
    for (int r = 0; r < 15; r++) for (int c = 0; c < 7; c++) for (int i = 0; i < BLK_DIM; i++)
      ref1.w[r][c][i] = ref0.w[r][c][i];
    for (int r = 0; r < 15; r++) for (int c = 0; c < 7; c++) for (int i = 0; i < BLK_DIM; i++)
      wr(1, 32'h4000 | ((r * ARR_COLS + c) << 6) | i, 32'(ref1.w[r][c][i]));
    for (int c = 0; c < 2; c++) begin wr(c[0], 5, 32'h01ff_ffff); wr(c[0], 0, ctrl(MODE_VERT, 0, 1, 0)); end
    n_mode[MODE_VERT]++;
    run(1, OFF1);
    checks++;
    if (got0.size() + got1.size() != 0) begin failures++; $display("calibration frame reported"); end
    set_thr(ref0, 0, 0, 7, 15, 3, 10);
    set_thr(ref1, 1, 1, 7, 15, 2, 9);
    for (int c = 0; c < 2; c++) wr(c[0], 0, ctrl(MODE_VERT, 0, 1, 1));
    run(1, OFF1);
    expect_reports("A core 0", got0, ref0, 7, 15);
    expect_reports("A core 1", got1, ref1, 7, 15);
    check_counters(0, "A core 0");
    check_counters(1, "A core 1");

    // B: core 1 classifies core 0's features with 128x64 windows
    share_mode = 1;
    load_coefs(ref1, MODE_HORZ, 1, 15, 7);
    for (int k = 0; k < ref0.feat.size(); k++) ref1.feat[k] = ref0.feat[k];
    set_thr(ref1, 1, 1, 15, 7, 1, 4);
    wr(1, 0, ctrl(MODE_HORZ, 1, 0, 1));
    wr(0, 0, ctrl(MODE_VERT, 0, 1, 1));
    n_mode[MODE_HORZ]++;
    run(0, 0);
    expect_reports("B core 0", got0, ref0, 7, 15);
    expect_reports("B core 1", got1, ref1, 15, 7);
    check_counters(1, "B core 1");

    // C: square windows, rows 0..7 on core 0 and 8..14 on core 1
    load_coefs(ref0, MODE_SQ_HEAD, 0, 15, 15);
    set_thr(ref0, 0, 1, 15, 15, 4, 11);
    wr(1, 0, ctrl(MODE_SQ_TAIL, 1, 0, 1));
    wr(0, 0, ctrl(MODE_SQ_HEAD, 0, 1, 1));
    n_mode[MODE_SQ_HEAD]++; n_mode[MODE_SQ_TAIL]++;
    run(0, 0);
    both = got0;
    foreach (got1[k]) both.push_back(got1[k]);
    expect_reports("C square", both, ref0, 15, 15);
    begin
      int ne, nf;
      ne = 0; nf = 0;
      foreach (both[k]) if (both[k].early) ne++; else nf++;
      checks++; if (ne == 0) begin failures++; $display("C: no early report"); end
      checks++; if (nf == 0) begin failures++; $display("C: no final report"); end
      checks++; if (got1.size() == 0) begin failures++; $display("C: tail core reported nothing"); end
    end
    check_counters(1, "C core 1");

    $display("stalls %0d, words %0d/%0d, shared %0d, transfers %0d, irq cycles %0d",
             n_stall, n_word[0], n_word[1], n_share, n_xfer, n_irq);
    checks++; if (n_stall == 0) begin failures++; $display("memory bus never stalled"); end
    checks++; if (n_word[0] == 0 || n_word[1] == 0) begin failures++; $display("a core got no pixels"); end
    checks++; if (n_share == 0) begin failures++; $display("no shared features"); end
    checks++; if (n_xfer == 0) begin failures++; $display("no partial-sum transfers"); end
    checks++; if (n_irq == 0) begin failures++; $display("interrupt never raised"); end
    for (int m = 0; m < 4; m++) begin
      checks++; if (n_mode[m] == 0) begin failures++; $display("mode %0d never used", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
