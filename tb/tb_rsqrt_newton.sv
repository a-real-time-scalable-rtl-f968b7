// tb_rsqrt_newton: compares y*2^-e with 1/sqrt(S) computed in floating point
// for S across the whole 40-bit range, and checks the ITERS+1 cycle latency.
module tb_rsqrt_newton;
  logic clk = 0, rst_n = 0, start = 0;
  logic [39:0] s = 0;
  logic done, zero;
  logic [15:0] y;
  logic [5:0] e;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  rsqrt_newton #(.S_W(40), .ITERS(4)) dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(input logic [39:0] v);
    int lat;
    real got, exp;
    @(negedge clk); start = 1; s = v;
    @(negedge clk); start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 5) begin failures++; $display("latency %0d", lat); end
    checks++;
    if (v == 0) begin
      if (!zero) begin failures++; $display("zero flag missing"); end
    end else begin
      got = real'(y) / 32768.0 / (2.0 ** e);
      exp = 1.0 / $sqrt(real'(v));
      if (got > exp * 1.0005 + 1e-12 || got < exp * 0.9995 - 1e-12) begin
        failures++;
        $display("S=%0d got %e exp %e (y=%0d e=%0d)", v, got, exp, y, e);
      end
    end
  endtask
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0); run(1); run(2); run(3); run(4); run(1000000); run(40'hFF_FFFF_FFFF);
    for (int k = 0; k < 300; k++) begin
      int sh;
      sh = $urandom_range(39);
      run((40'($urandom) << 8 | 40'($urandom_range(255))) >> sh | 40'd1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
