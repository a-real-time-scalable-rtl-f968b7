// tb_svm_mac: random loads and multiply-accumulates against a reference sum,
// including a dead (alive = 0) partial sum that must not change.
module tb_svm_mac;
  import hog_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, mac_en = 0;
  psum_t load_val = '0, psum;
  logic [FEAT_W-1:0] feat = 0;
  logic signed [COEF_W-1:0] coef = 0;
  int checks = 0, failures = 0;
  longint ref_acc;
  logic ref_alive;
  always #5 clk = ~clk;
  svm_mac dut (.*);
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 600; k++) begin
      @(negedge clk);
      load = ($urandom_range(20) == 0);
      mac_en = $urandom_range(3) != 0;
      feat = FEAT_W'($urandom);
      coef = COEF_W'($urandom);
      if (load) begin
        load_val.alive = ($urandom_range(3) != 0);
        load_val.acc = ACC_W'(int'($urandom_range(200000)) - 100000);
        ref_acc = longint'(load_val.acc); ref_alive = load_val.alive;
      end else if (mac_en && ref_alive) begin
        ref_acc += longint'(feat) * longint'(coef);
      end
      @(posedge clk); #1;
      if (k > 0 || load) begin
        checks++;
        if (longint'(psum.acc) != ref_acc || psum.alive != ref_alive) begin
          failures++; $display("step %0d got %0d/%0d exp %0d/%0d", k, psum.acc, psum.alive, ref_acc, ref_alive);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin ref_acc = 0; ref_alive = 0; end
endmodule
