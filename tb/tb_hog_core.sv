// tb_hog_core: one core end to end. A 144x144 synthetic image (18x18
// cells) is streamed into the core while the testbench, acting as the CPU,
// polls the status register and pops detection results. Run 1 (early
// classification off) records the block features leaving the normaliser;
// thresholds are then picked from the reference partial sums so that early
// detection, early rejection and final detection all occur. Runs 2 and 3
// (64x128 vertical and 128x64 horizontal windows) must report exactly the
// windows the reference model predicts from those features. Line-buffer
// back-pressure must occur.
module tb_hog_core;
  import hog_pkg::*;
  `include "hog_ref.svh"
  localparam int W = 144, H = 144, CX = W / 8, CY = H / 8;
  logic clk = 0, rst_n = 0;
  logic reg_we = 0, reg_re = 0;
  logic [14:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic irq, busy;
  logic pix_valid = 0, pix_ready;
  logic [31:0] pix_data = 0;
  logic feat_out_valid, feat_out_fire, uses_peer_feat, svm_ready_out, xfer_out_valid;
  feat_pkt_t feat_out_pkt;
  xfer_t xfer_out;
  int checks = 0, failures = 0, stalls = 0, cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  hog_core #(.IMG_W(256)) dut (
    .clk, .rst_n, .reg_we, .reg_re, .reg_addr, .reg_wdata, .reg_rdata, .irq, .busy,
    .pix_valid, .pix_data, .pix_ready,
    .feat_out_valid, .feat_out_pkt, .feat_out_fire, .uses_peer_feat, .svm_ready_out,
    .feat_in_valid(1'b0), .feat_in_pkt('0), .feat_in_fire(1'b0),
    .peer_uses_our_feat(1'b0), .peer_svm_ready(1'b0),
    .xfer_out_valid, .xfer_out, .xfer_in_valid(1'b0), .xfer_in('0));

  hog_ref refm;
  det_t got [$];
  det_t exp_q [$];
  int nfeat = 0;
  always @(posedge clk) begin
    if (rst_n && feat_out_fire) begin refm.set_feat(feat_out_pkt); nfeat++; end
    if (rst_n && pix_valid && !pix_ready) stalls++;
  end

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [7:0] pix(int x, int y);
    int v;
    v = ((x - 70) * (x - 70) + 3 * (y - 60) * (y - 60)) / 23 + ((x / 16 + y / 24) % 2) * 90;
    return 8'(v + (x * 7 ^ y * 5) % 9);
  endfunction

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = 15'(a); reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask
  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); reg_re = 1; reg_addr = 15'(a);
    @(negedge clk); reg_re = 0; d = reg_rdata;
  endtask

  task automatic load_coefs(svm_mode_e m, int wc, int wr_);
    for (int r = 0; r < wr_; r++) for (int c = 0; c < wc; c++) for (int i = 0; i < BLK_DIM; i++) begin
      bit c1;
      int pe;
      refm.w[r][c][i] = int'($urandom_range(255)) - 128;
      pe = pe_of(m, r, c, c1);
      wr(32'h4000 | (pe << 6) | i, 32'(refm.w[r][c][i]));
    end
  endtask

  task automatic set_thr(int wc, int wr_, int r1, int r2);
    longint q [$];
    refm.sums_at(wc, wr_, r1, q);
    refm.thr_det[r1] = q[q.size() * 9 / 10]; refm.thr_rej[r1] = q[q.size() / 10];
    refm.sums_at(wc, wr_, r2, q);
    refm.thr_det[r2] = q[q.size() * 8 / 10]; refm.thr_rej[r2] = q[q.size() / 4];
    refm.sums_at(wc, wr_, wr_ - 1, q);
    refm.final_thr = q[q.size() / 2];
    refm.ec = 1;
    for (int r = 0; r < NTHR; r++) begin
      wr(16 + r, 32'(refm.thr_det[r] > 64'sd30000000 ? 64'sd30000000 : refm.thr_det[r]));
      wr(32 + r, 32'(refm.thr_rej[r] < -64'sd30000000 ? -64'sd30000000 : refm.thr_rej[r]));
    end
    wr(5, 32'(refm.final_thr));
  endtask

  task automatic run_frame(svm_mode_e m, bit ec, output int cycles);
    logic [31:0] d, pos;
    bit fin;
    int t0;
    got.delete();
    wr(1, {8'd0, 8'(CY), 8'd0, 8'(CX)});
    wr(0, {26'd0, ec, 1'b1, 1'b0, m, 1'b1});
    t0 = cycle;
    fork
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x += 4) begin
          @(negedge clk);
          pix_valid = 1; pix_data = {pix(x+3,y), pix(x+2,y), pix(x+1,y), pix(x,y)};
          @(posedge clk); while (!pix_ready) @(posedge clk);
          #1 pix_valid = 0;
        end
      begin
        fin = 0;
        while (!fin) begin
          rd(2, d);
          if (d[2]) begin
            det_t r;
            rd(3, pos); rd(4, d);
            r.wx = pos[7:0]; r.wy = pos[23:16]; r.early = pos[31]; r.score = ACC_W'(d);
            got.push_back(r);
          end else if (d[1]) fin = 1;
        end
      end
    join
    cycles = cycle - t0;
  endtask

  initial begin
    int cyc;
    logic [31:0] d;
    refm = new(CX - 1, CY - 1);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // run 1: record features, no reports
    load_coefs(MODE_VERT, 7, 15);
    wr(5, 32'h01ff_ffff);
    run_frame(MODE_VERT, 0, cyc);
    checks++;
    if (got.size() != 0 || nfeat != (CX - 1) * (CY - 1)) begin
      failures++; $display("run 1: %0d reports, %0d features", got.size(), nfeat);
    end
    $display("frame of %0d blocks took %0d cycles", nfeat, cyc);
    // run 2: vertical windows with early classification
    set_thr(7, 15, 3, 10);
    run_frame(MODE_VERT, 1, cyc);
    refm.expected(7, 15, exp_q);
    checks++;
    failures += (compare("vertical", got, exp_q) != 0);
    $display("vertical: %0d reports", got.size());
    rd(6, d); checks++; if (d == 0) begin failures++; $display("no early detection"); end
    rd(7, d); checks++; if (d == 0) begin failures++; $display("no early rejection"); end
    rd(8, d); checks++; if (d == 0) begin failures++; $display("no final detection"); end
    // run 3: horizontal windows
    for (int r = 0; r < NTHR; r++) begin refm.thr_det[r] = 64'sd1 << 40; refm.thr_rej[r] = -(64'sd1 << 40); end
    load_coefs(MODE_HORZ, 15, 7);
    set_thr(15, 7, 1, 4);
    run_frame(MODE_HORZ, 1, cyc);
    refm.expected(15, 7, exp_q);
    checks++;
    failures += (compare("horizontal", got, exp_q) != 0);
    $display("horizontal: %0d reports", got.size());
    checks++;
    if (stalls == 0) begin failures++; $display("line buffer never stalled the memory bus"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
