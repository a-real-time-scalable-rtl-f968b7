// tb_sram_1r1w: random writes and reads against a reference array,
// including read-before-write on the same address.
module tb_sram_1r1w;
  localparam int W = 20, D = 37;
  logic clk = 0, we = 0, re = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  sram_1r1w #(.WIDTH(W), .DEPTH(D)) dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int a = 0; a < D; a++) begin
      @(negedge clk); we = 1; waddr = 6'(a); wdata = W'($urandom); model[a] = wdata;
    end
    for (int k = 0; k < 500; k++) begin
      logic [W-1:0] exp;
      @(negedge clk);
      raddr = 6'($urandom_range(D - 1));
      re = 1;
      we = $urandom_range(1);
      waddr = ($urandom_range(3) == 0) ? raddr : 6'($urandom_range(D - 1));
      wdata = W'($urandom);
      exp = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== exp) begin failures++; $display("addr %0d got %h exp %h", raddr, rdata, exp); end
      we = 0; re = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
