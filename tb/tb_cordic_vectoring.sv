// tb_cordic_vectoring: checks CORDIC magnitude and orientation against
// floating-point atan2 and sqrt for random gradients, and checks the
// pipeline latency of ITER+2 cycles.
module tb_cordic_vectoring;
  import hog_pkg::*;
  localparam int unsigned ITER = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [PIX_W:0] gx = 0, gy = 0;
  logic [15:0] in_tag = 0;
  logic out_valid;
  logic [MAG_W-1:0] mag;
  logic [ANG_W-2:0] ang;
  logic [15:0] out_tag;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cordic_vectoring #(.ITER(ITER), .TAG_W(16)) dut (.*);

  localparam int N = 400;
  int sx [N];
  int sy [N];
  int issue_cycle [N];
  int cycle = 0;
  always_ff @(posedge clk) cycle <= cycle + 1;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected values by floating point
  task automatic check(input int k, input int m, input int a);
    real fx, fy, th, em, d;
    fx = sx[k]; fy = sy[k];
    if (fy < 0 || (fy == 0 && fx < 0)) begin fx = -fx; fy = -fy; end
    th = $atan2(fy, fx) * 180.0 / 3.14159265358979;   // 0..180
    em = 1.64676 * $sqrt(fx*fx + fy*fy);
    checks++;
    if ((m - em > 0.02*em + 3.0) || (em - m > 0.02*em + 3.0)) begin
      failures++;
      $display("mag mismatch g=(%0d,%0d) got %0d exp %f", sx[k], sy[k], m, em);
    end
    if (sx[k] != 0 || sy[k] != 0) begin
      d = a / 3.2 - th;
      if (d > 90.0) d -= 180.0;
      if (d < -90.0) d += 180.0;
      checks++;
      if (d > 1.5 || d < -1.5) begin
        failures++;
        $display("angle mismatch g=(%0d,%0d) got %0d (%f deg) exp %f deg", sx[k], sy[k], a, a/3.2, th);
      end
    end
  endtask

  int got = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      check(int'(out_tag), int'(mag), int'(ang));
      checks++;
      if (cycle - issue_cycle[out_tag] != ITER + 2) begin
        failures++;
        $display("latency %0d", cycle - issue_cycle[out_tag]);
      end
      got++;
    end
  end

  initial begin
    for (int k = 0; k < N; k++) begin
      if (k < 8) begin
        int ex[8] = '{100, 0, -100, 0, 70, -70, 255, -255};
        int ey[8] = '{0, 100, 0, -100, 70, 70, -255, 255};
        sx[k] = ex[k]; sy[k] = ey[k];
      end else begin
        sx[k] = int'($urandom_range(510)) - 255;
        sy[k] = int'($urandom_range(510)) - 255;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      in_valid = 1; gx = (PIX_W+1)'(sx[k]); gy = (PIX_W+1)'(sy[k]); in_tag = 16'(k);
      issue_cycle[k] = cycle;
    end
    @(negedge clk) in_valid = 0;
    repeat (ITER + 6) @(posedge clk);
    checks++;
    if (got != N) begin failures++; $display("got %0d of %0d", got, N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
