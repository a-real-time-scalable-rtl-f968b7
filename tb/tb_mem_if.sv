// tb_mem_if: random tagged words with random readiness of the two cores;
// every word must reach the core named by its tag, in order, exactly once.
module tb_mem_if;
  logic clk = 0, rst_n = 0;
  logic mem_valid = 0, mem_core = 0, mem_ready;
  logic [31:0] mem_data = 0, pix_data;
  logic [1:0] pix_valid, pix_ready = 0;
  logic [31:0] expq [2][$];
  int checks = 0, failures = 0, sent = 0, recv = 0;
  always #5 clk = ~clk;
  mem_if dut (.*);
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(negedge clk) pix_ready <= 2'($urandom);
  always @(posedge clk) begin
    for (int c = 0; c < 2; c++)
      if (rst_n && pix_valid[c] && pix_ready[c]) begin
        checks++;
        recv++;
        if (expq[c].size() == 0 || expq[c][0] != pix_data) begin
          failures++; $display("core %0d got %h", c, pix_data);
        end else void'(expq[c].pop_front());
      end
    checks++;
    if (rst_n && pix_valid == 2'b11) begin failures++; $display("both valid"); end
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (sent < 300) begin
      @(negedge clk);
      mem_valid = $urandom_range(3) != 0; mem_core = $urandom_range(1); mem_data = $urandom;
      @(posedge clk);
      if (mem_valid && mem_ready) begin expq[mem_core].push_back(mem_data); sent++; end
    end
    @(negedge clk) mem_valid = 0;
    repeat (100) @(posedge clk);
    checks++;
    if (recv != sent) begin failures++; $display("sent %0d received %0d", sent, recv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
