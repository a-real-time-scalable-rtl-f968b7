// tb_hog_vlsi_hdtv: one full-size HDTV frame through the chip at its
// default parameters (1920-pixel rows, 8 CORDIC iterations).
//
// The 1920x1080 frame (240x135 cells) is split over the two cores as the
// dual-core mode does it: core 0 gets cell rows 0..74, core 1 cell rows
// 60..134, so the two halves overlap by 15 cell rows and every 64x128
// window of the frame lies wholly inside one half. Pixel words for both
// cores are interleaved on the one memory bus. A calibration frame (early
// classification off) records each core's block features; thresholds are
// picked from the reference partial sums and the frame is run again. The
// reports of both cores must equal the reference model's, and the second
// frame, from the start command to both cores done, must take no more than
// 1.43 million clock cycles (30 frames per second at 42.9 MHz).
module tb_hog_vlsi_hdtv;
  import hog_pkg::*;
  `include "hog_ref.svh"
  localparam int W = 1920, H = 1080, CX = W / 8;
  localparam int RCY = 75;                  // cell rows per core region
  localparam int OFF1 = 60;                 // first cell row of core 1
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
  int n_stall = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  hog_vlsi dut (
    .clk, .rst_n, .cpu_cs, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rdata, .cpu_rvalid, .cpu_irq,
    .mem_valid, .mem_core, .mem_data, .mem_ready, .core_busy);

  hog_ref ref0, ref1;
  det_t got0 [$], got1 [$], exp_q [$];

  // feature capture and mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (dut.g_core[0].u_core.feat_out_fire) ref0.set_feat(dut.g_core[0].u_core.feat_out_pkt);
    if (dut.g_core[1].u_core.feat_out_fire) ref1.set_feat(dut.g_core[1].u_core.feat_out_pkt);
    if (mem_valid && !mem_ready) n_stall++;
  end

  initial begin
    #60000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [7:0] pix(int x, int y);
    int v;
    v = ((x % 300 - 150) * (x % 300 - 150) + 2 * (y % 260 - 130) * (y % 260 - 130)) / 97
        + ((x / 16 + y / 24) % 2) * 80;
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
    int t0, frame_cycles;
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
    run(1, OFF1);
    checks++;
    if (got0.size() + got1.size() != 0) begin failures++; $display("calibration frame reported"); end
    set_thr(ref0, 0, 0, 7, 15, 3, 10);
    set_thr(ref1, 1, 1, 7, 15, 2, 9);
    for (int c = 0; c < 2; c++) wr(c[0], 0, ctrl(MODE_VERT, 0, 1, 1));
    t0 = cycle;
    run(1, OFF1);
    frame_cycles = cycle - t0;
    expect_reports("A core 0", got0, ref0, 7, 15);
    expect_reports("A core 1", got1, ref1, 7, 15);
    check_counters(0, "A core 0");
    check_counters(1, "A core 1");

    $display("frame took %0d cycles, memory bus stalled %0d cycles", frame_cycles, n_stall);
    checks++;
    if (frame_cycles > 1430000) begin failures++; $display("frame slower than 1.43M cycles"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
