// tb_cpu_if: checks core selection by address bit 15, write and read
// strobes, the two-cycle read latency and the interrupt merge, with two
// small register-file models standing in for the cores. Reads are also
// issued on every cycle, alternating between the cores, and the returned
// words must come back in order.
module tb_cpu_if;
  logic clk = 0, rst_n = 0;
  logic cpu_cs = 0, cpu_we = 0;
  logic [15:0] cpu_addr = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata;
  logic cpu_rvalid, cpu_irq;
  logic [1:0] reg_we, reg_re, core_irq = 0;
  logic [14:0] reg_addr;
  logic [31:0] reg_wdata;
  logic [1:0][31:0] reg_rdata;
  logic [31:0] rf [2][16];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  cpu_if dut (.*);
  // register-file models with one-cycle read latency
  for (genvar c = 0; c < 2; c++) begin : g_m
    always_ff @(posedge clk) begin
      if (reg_we[c]) rf[c][reg_addr[3:0]] <= reg_wdata;
      if (reg_re[c]) reg_rdata[c] <= rf[c][reg_addr[3:0]];
    end
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); cpu_cs = 1; cpu_we = 1; cpu_addr = a; cpu_wdata = d;
    @(negedge clk); cpu_cs = 0; cpu_we = 0;
  endtask
  task automatic rd(input logic [15:0] a, input logic [31:0] e);
    int lat;
    @(negedge clk); cpu_cs = 1; cpu_we = 0; cpu_addr = a;
    @(negedge clk); cpu_cs = 0; lat = 1;
    while (!cpu_rvalid) begin @(negedge clk); lat++; end
    checks++;
    if (cpu_rdata !== e || lat != 2) begin
      failures++; $display("read %h got %h exp %h latency %0d", a, cpu_rdata, e, lat);
    end
  endtask
  logic [31:0] m [2][16];
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 16; k++) begin
      m[0][k] = $urandom; m[1][k] = $urandom;
      wr(16'(k), m[0][k]);
      wr(16'h8000 | 16'(k), m[1][k]);
    end
    for (int k = 0; k < 40; k++) begin
      int c, a;
      c = $urandom_range(1); a = $urandom_range(15);
      rd(16'(c << 15 | a), m[c][a]);
    end
    // back-to-back reads, alternating cores
    fork
      for (int k = 0; k < 32; k++) begin
        @(negedge clk); cpu_cs = 1; cpu_we = 0; cpu_addr = 16'((k % 2) << 15 | (k * 5) % 16);
        if (k == 31) begin @(negedge clk); cpu_cs = 0; end
      end
      for (int k = 0; k < 32; k++) begin
        @(negedge clk);
        while (!cpu_rvalid) @(negedge clk);
        checks++;
        if (cpu_rdata !== m[k % 2][(k * 5) % 16]) begin
          failures++; $display("burst read %0d got %h exp %h", k, cpu_rdata, m[k % 2][(k * 5) % 16]);
        end
      end
    join
    for (int v = 0; v < 4; v++) begin
      @(negedge clk) core_irq = 2'(v);
      #1 checks++;
      if (cpu_irq != (v != 0)) begin failures++; $display("irq"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
