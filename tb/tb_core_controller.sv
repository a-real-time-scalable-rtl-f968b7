// tb_core_controller: register writes and read-back, the start pulse, the
// coefficient write decode, result pop through RES_SCORE, and the done flag
// and interrupt after the classifier has taken the last block of a frame.
module tb_core_controller;
  import hog_pkg::*;
  logic clk = 0, rst_n = 0;
  logic reg_we = 0, reg_re = 0;
  logic [14:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic frame_start, feat_src_peer, extract_en, ec_en;
  svm_mode_e mode;
  logic [7:0] cells_x, cells_y;
  logic signed [ACC_W-1:0] thr_det [NTHR], thr_rej [NTHR], final_thr;
  logic coef_we;
  logic [6:0] coef_pe;
  logic [5:0] coef_idx;
  logic signed [7:0] coef_data;
  logic svm_accept = 0, svm_idle = 1, det_valid = 0, det_pop, busy, irq;
  logic [7:0] svm_bx = 0, svm_by = 0;
  det_t det = '0;
  logic [31:0] n_early_det = 11, n_early_rej = 22, n_final = 33;
  int checks = 0, failures = 0, starts = 0;
  always #5 clk = ~clk;
  core_controller dut (.*);
  always @(posedge clk) if (frame_start) starts++;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = 15'(a); reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask
  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); reg_re = 1; reg_addr = 15'(a);
    @(negedge clk); reg_re = 0; d = reg_rdata;
  endtask
  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d exp %0d", what, got, exp); end
  endtask
  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wr(1, 32'h0011_0014);                         // 20 x 17 cells
    expect_eq("cells_x", cells_x, 20); expect_eq("cells_y", cells_y, 17);
    for (int r = 0; r < NTHR; r++) begin wr(16 + r, 32'(r * 100 - 700)); wr(32 + r, 32'(-r * 50)); end
    wr(5, -32'sd1234);
    expect_eq("final_thr", final_thr, -1234);
    for (int r = 0; r < NTHR; r++) begin
      expect_eq("thr_det", thr_det[r], r * 100 - 700); expect_eq("thr_rej", thr_rej[r], -r * 50);
      rd(16 + r, d); expect_eq("thr_det rd", int'(d), r * 100 - 700);
    end
    // coefficient write decode
    @(negedge clk); reg_we = 1; reg_addr = 15'h4000 | 15'(77 << 6) | 15'd35; reg_wdata = 32'hfe;
    #1 expect_eq("coef_we", coef_we, 1); expect_eq("coef_pe", coef_pe, 77);
    expect_eq("coef_idx", coef_idx, 35); expect_eq("coef_data", coef_data, -2);
    @(negedge clk); reg_we = 0;
    // start a frame in horizontal mode with sharing and no extraction
    wr(0, 32'b10_1011);   // ec_en=1, extract=0, peer=1, mode=1, start
    expect_eq("mode", mode, MODE_HORZ); expect_eq("peer", feat_src_peer, 1);
    expect_eq("extract", extract_en, 0); expect_eq("ec", ec_en, 1);
    expect_eq("busy", busy, 1);
    rd(2, d); expect_eq("status busy", d, 1);
    expect_eq("start pulses", starts, 1);
    // classifier takes blocks; the last one is (18, 15)
    @(negedge clk); svm_accept = 1; svm_bx = 18; svm_by = 14; svm_idle = 0;
    @(negedge clk); svm_accept = 0;
    repeat (3) @(negedge clk); svm_idle = 1;
    @(negedge clk); expect_eq("not done yet", busy, 1);
    svm_idle = 0; svm_accept = 1; svm_bx = 18; svm_by = 15;
    @(negedge clk); svm_accept = 0;
    repeat (3) @(negedge clk);
    expect_eq("still busy while classifying", busy, 1);
    svm_idle = 1;
    repeat (2) @(negedge clk);
    expect_eq("done", busy, 0); expect_eq("irq", irq, 1);
    rd(2, d); expect_eq("status done", d, 2);
    // a result waiting
    det.wx = 9; det.wy = 4; det.early = 1; det.score = -27'sd5000; det_valid = 1;
    rd(3, d); expect_eq("res_pos", d, 32'hC004_0009);
    @(negedge clk); reg_re = 1; reg_addr = 4;
    #1 expect_eq("pop", det_pop, 1);
    @(negedge clk); reg_re = 0; expect_eq("score", int'(reg_rdata), -5000);
    rd(6, d); expect_eq("cnt", d, 11); rd(8, d); expect_eq("cnt", d, 33);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
