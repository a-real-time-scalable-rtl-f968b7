// tb_l2_norm_stage: random 36-element vectors (plus a zero vector and one
// with a single dominant element) through a clipping stage; each output is
// compared with min(v/||v|| * 4096, 819) computed in floating point, and the
// accept-to-result latency is checked. Then vectors are streamed back to
// back: with the consumer always ready a result must leave every 78 cycles;
// with a randomly stalling consumer every result must still arrive, in
// order, with its own tag and value.
module tb_l2_norm_stage;
  localparam int N = 36, LAT = 78;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [N-1:0][15:0] in_vec = '0;
  logic [N-1:0][11:0] out_vec;
  logic [15:0] in_tag = 0, out_tag;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  l2_norm_stage #(.N(N), .IN_W(16), .OUT_W(12), .OUT_FRAC(12), .CLIP(819), .S_W(40), .TAG_W(16)) dut (.*);
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(input logic [N-1:0][15:0] v, input int tag);
    real norm, e;
    int lat;
    norm = 0;
    for (int k = 0; k < N; k++) norm += real'(v[k]) * real'(v[k]);
    norm = $sqrt(norm);
    @(negedge clk); in_valid = 1; in_vec = v; in_tag = 16'(tag);
    @(posedge clk); while (!in_ready) @(posedge clk);
    lat = 0;
    @(negedge clk); in_valid = 0;
    while (!out_valid) begin @(negedge clk); lat++; end
    checks++;
    if (lat != LAT) begin failures++; $display("latency %0d expected %0d", lat, LAT); end
    checks++;
    if (out_tag != 16'(tag)) begin failures++; $display("tag"); end
    for (int k = 0; k < N; k++) begin
      e = (norm == 0) ? 0 : real'(v[k]) / norm * 4096.0;
      if (e > 819.0) e = 819.0;
      checks++;
      if (real'(out_vec[k]) > e + 2.0 || real'(out_vec[k]) < e - 3.0) begin
        failures++;
        $display("elem %0d got %0d exp %f", k, out_vec[k], e);
      end
    end
  endtask
  function automatic int bad_elems(logic [N-1:0][15:0] v, logic [N-1:0][11:0] o);
    real norm, e;
    int bad;
    norm = 0; bad = 0;
    for (int k = 0; k < N; k++) norm += real'(v[k]) * real'(v[k]);
    norm = $sqrt(norm);
    for (int k = 0; k < N; k++) begin
      e = (norm == 0) ? 0 : real'(v[k]) / norm * 4096.0;
      if (e > 819.0) e = 819.0;
      if (real'(o[k]) > e + 2.0 || real'(o[k]) < e - 3.0) bad++;
    end
    return bad;
  endfunction

  // stream NV vectors; stall = randomly drop out_ready
  task automatic stream(int nv, bit stall);
    logic [N-1:0][15:0] vs [$];
    int last_t, t, got;
    for (int n = 0; n < nv; n++) begin
      logic [N-1:0][15:0] v;
      for (int k = 0; k < N; k++) v[k] = 16'($urandom_range(65535) >> $urandom_range(12));
      vs.push_back(v);
    end
    got = 0; t = 0; last_t = -1;
    fork
      for (int n = 0; n < nv; n++) begin
        @(negedge clk); in_valid = 1; in_vec = vs[n]; in_tag = 16'(1000 + n);
        @(posedge clk); while (!in_ready) @(posedge clk);
        #1 in_valid = 0;
      end
      while (got < nv) begin
        @(negedge clk);
        t++;
        out_ready = stall ? ($urandom_range(3) == 0) : 1'b1;
        @(posedge clk);
        if (out_valid && out_ready) begin
          checks++;
          if (out_tag != 16'(1000 + got) || bad_elems(vs[got], out_vec) != 0) begin
            failures++; $display("streamed result %0d wrong (tag %0d)", got, out_tag);
          end
          if (!stall && last_t >= 0) begin
            checks++;
            if (t - last_t != LAT) begin failures++; $display("result period %0d expected %0d", t - last_t, LAT); end
          end
          last_t = t;
          got++;
        end
      end
    join
    @(negedge clk) out_ready = 1;
  endtask

  initial begin
    logic [N-1:0][15:0] v;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run('0, 1);
    v = '0; v[3] = 16'd40000; v[7] = 16'd100;
    run(v, 2);
    for (int t = 0; t < 40; t++) begin
      int sc;
      sc = $urandom_range(15);
      for (int k = 0; k < N; k++) v[k] = 16'($urandom_range(65535) >> sc);
      run(v, t + 3);
    end
    stream(12, 0);
    stream(12, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
