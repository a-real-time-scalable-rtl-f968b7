// svm_coef_sram: SVM coefficient memory of one classification module.
//
// Each core keeps its own coefficients, so that the two cores can look for
// different objects (source description, Sec. on operating modes). The
// memory holds one word per feature element (36 words); a word carries one
// signed byte for every MAC of the array (120 bytes), so that one read feeds
// all MACs at once. The host writes single bytes (byte-enable write). The
// word organisation is this design's own.
// Timing: synchronous read, data one cycle after re.
module svm_coef_sram
  import hog_pkg::*;
#(
  parameter int unsigned NPES  = NPE,
  parameter int unsigned WORDS = BLK_DIM
) (
  input  logic                                clk,
  input  logic                                we,
  input  logic [$clog2(NPES)-1:0]             wpe,
  input  logic [$clog2(WORDS)-1:0]            widx,
  input  logic signed [COEF_W-1:0]            wdata,
  input  logic                                re,
  input  logic [$clog2(WORDS)-1:0]            ridx,
  output logic [NPES-1:0][COEF_W-1:0]         rdata
);
  logic [NPES-1:0][COEF_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[widx][wpe] <= wdata;
    if (re) rdata <= mem[ridx];
  end
endmodule
