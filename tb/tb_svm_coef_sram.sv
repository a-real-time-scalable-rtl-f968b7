// tb_svm_coef_sram: fills all 36x120 coefficient bytes, rewrites some, and
// reads every word back against a reference array.
module tb_svm_coef_sram;
  import hog_pkg::*;
  logic clk = 0, we = 0, re = 0;
  logic [6:0] wpe = 0;
  logic [5:0] widx = 0, ridx = 0;
  logic signed [7:0] wdata = 0;
  logic [NPE-1:0][7:0] rdata;
  logic [7:0] model [BLK_DIM][NPE];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  svm_coef_sram dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < BLK_DIM; i++)
      for (int p = 0; p < NPE; p++) begin
        @(negedge clk); we = 1; wpe = 7'(p); widx = 6'(i); wdata = 8'($urandom); model[i][p] = wdata;
      end
    for (int k = 0; k < 200; k++) begin
      @(negedge clk); wpe = 7'($urandom_range(NPE - 1)); widx = 6'($urandom_range(BLK_DIM - 1));
      wdata = 8'($urandom); model[widx][wpe] = wdata;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < BLK_DIM; i++) begin
      @(negedge clk); re = 1; ridx = 6'(i);
      @(negedge clk); re = 0;
      for (int p = 0; p < NPE; p++) begin
        checks++;
        if (rdata[p] !== model[i][p]) begin failures++; $display("word %0d pe %0d", i, p); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
