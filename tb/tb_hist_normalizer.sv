// tb_hist_normalizer: streams random block histograms back to back and
// compares the Q0.8 features with a floating-point L2-Hys reference
// (normalise, clip at 0.2, normalise). Checks the block order and that
// both stages overlap: 20 blocks must take fewer than 20*81+100 cycles.
module tb_hist_normalizer;
  import hog_pkg::*;
  localparam int NB = 20;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 1;
  blk_hist_t in_pkt = '0;
  feat_pkt_t out_pkt;
  blk_hist_t sent [NB];
  int checks = 0, failures = 0, nout = 0, cycle = 0, t0 = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;
  hist_normalizer dut (.*);
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      real v [BLK_DIM];
      real n1, n2, e;
      n1 = 0;
      for (int k = 0; k < BLK_DIM; k++) n1 += real'(sent[nout].h[k]) ** 2;
      n1 = $sqrt(n1);
      n2 = 0;
      for (int k = 0; k < BLK_DIM; k++) begin
        v[k] = (n1 == 0) ? 0 : real'(sent[nout].h[k]) / n1;
        if (v[k] > 0.2) v[k] = 0.2;
        n2 += v[k] * v[k];
      end
      n2 = $sqrt(n2);
      checks++;
      if (out_pkt.bx != sent[nout].bx || out_pkt.by != sent[nout].by) begin
        failures++; $display("order: block %0d", nout);
      end
      for (int k = 0; k < BLK_DIM; k++) begin
        e = (n2 == 0) ? 0 : v[k] / n2 * 256.0;
        if (e > 255.0) e = 255.0;
        checks++;
        if (real'(out_pkt.f[k]) > e + 2.0 || real'(out_pkt.f[k]) < e - 3.0) begin
          failures++; $display("block %0d elem %0d got %0d exp %f", nout, k, out_pkt.f[k], e);
        end
      end
      nout++;
    end
  end
  initial begin
    for (int b = 0; b < NB; b++) begin
      sent[b].bx = CRD_W'(b); sent[b].by = CRD_W'(b * 3);
      for (int k = 0; k < BLK_DIM; k++)
        sent[b].h[k] = (b == 1) ? '0 : HIST_W'($urandom_range(40000) >> $urandom_range(6));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    t0 = cycle;
    for (int b = 0; b < NB; b++) begin
      @(negedge clk); in_valid = 1; in_pkt = sent[b];
      @(posedge clk); while (!in_ready) @(posedge clk);
    end
    @(negedge clk) in_valid = 0;
    wait (nout == NB);
    checks++;
    if (cycle - t0 > NB * 81 + 100) begin failures++; $display("too slow: %0d cycles", cycle - t0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
