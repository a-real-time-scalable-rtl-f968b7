// mem_if: memory bus interface of the chip.
//
// The grayscale image comes from the external frame memory over a 32-bit
// memory bus (four 8-bit pixels per word). Each word carries the number of
// the core it is meant for: in the dual-core mode each core receives its
// own part of the image, and with feature sharing only the extracting core
// receives pixels. Words are queued in a small FIFO and handed to the
// addressed core when its line buffer can take them. The bus width follows
// the description; the core tag, the queue and the valid/ready handshake
// are this design's own.
module mem_if #(
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // memory bus
  input  logic             mem_valid,
  input  logic             mem_core,
  input  logic [31:0]      mem_data,
  output logic             mem_ready,
  // to the cores
  output logic [1:0]       pix_valid,
  output logic [31:0]      pix_data,
  input  logic [1:0]       pix_ready
);
  logic        q_valid, q_ready, q_core;
  logic [31:0] q_data;
  logic [$clog2(DEPTH+1)-1:0] q_count;

  sync_fifo #(.WIDTH(33), .DEPTH(DEPTH)) u_q (
    .clk, .rst_n, .clear(1'b0),
    .wr_valid(mem_valid), .wr_data({mem_core, mem_data}), .wr_ready(mem_ready),
    .rd_valid(q_valid), .rd_data({q_core, q_data}), .rd_ready(q_ready),
    .count(q_count)
  );

  assign pix_data     = q_data;
  assign pix_valid[0] = q_valid && !q_core;
  assign pix_valid[1] = q_valid && q_core;
  assign q_ready      = pix_ready[q_core];
endmodule
