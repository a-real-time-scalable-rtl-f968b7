// sram_1r1w: working SRAM with one synchronous read and one write port.
//
// Stands for the on-chip working SRAM macros of a core (the intermediate
// cell histogram memory and the intermediate classification result memory).
// Written as an array so that synthesis can map it to a macro. Read data
// appears one cycle after re; when the same address is read and written in
// one cycle the read returns the old contents. Contents are not reset.
module sram_1r1w #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
