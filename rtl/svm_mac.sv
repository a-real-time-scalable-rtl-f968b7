// svm_mac: one multiply-accumulate element of the SVM MAC array.
//
// Holds the partial SVM sum of one detection window together with an alive
// flag. On load it takes a new partial sum (from its neighbour in the chain
// or from the intermediate-result SRAM); otherwise, when mac_en is high, it
// adds feat*coef. A window that early classification has already decided
// (alive = 0) is not accumulated any more, which is how the array skips the
// remaining work for it. The source description gives the MAC and the
// neighbour-to-neighbour shift; the alive flag is this design's way of
// skipping decided windows.
// Timing: one product per clock; psum is registered.
module svm_mac
  import hog_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  psum_t                    load_val,
  input  logic                     mac_en,
  input  logic [FEAT_W-1:0]        feat,
  input  logic signed [COEF_W-1:0] coef,
  output psum_t                    psum
);
  logic signed [FEAT_W+COEF_W:0] prod;
  assign prod = $signed({1'b0, feat}) * coef;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) psum <= '0;
    else if (load) psum <= load_val;
    else if (mac_en && psum.alive) psum.acc <= psum.acc + ACC_W'(prod);
  end
endmodule
