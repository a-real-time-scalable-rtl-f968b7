// cell_line_buffer: image row buffer with its write-side address generator.
//
// The grayscale image arrives from the memory interface in raster order as
// 32-bit words of four pixels (pixel 4k+j in byte j). The write address
// generator counts columns and rows of the current frame and stores each
// word into a ring of NROWS pixel rows. The cell scanner reads through four
// independent read ports (the four gradient neighbours of a pixel).
//
// The source description names a "cell line buffer" fed by an address
// generator; its size, organisation and flow control are this design's own.
// The ring holds 24 rows: while cell row cy (pixel rows 8cy..8cy+7, plus one
// halo row above and below) is being scanned, rows up to 8cy+22 may be
// written, so the whole next cell row (up to row 8cy+17) can be loaded
// during the scan and the scanner never waits for the bus at a cell-row
// boundary. Row r lives in slot r mod NROWS. wr_ready drops when the next
// row would overwrite a row still needed (row > 8*scan_cy+NROWS-2) or when
// the whole frame has been received. 24 rows of 1920 pixels are 369 Kbit
// per core.
//
// Interface: frame_start clears the counters; width_px/height_px give the
// frame size; rows_done counts complete rows. Reads are synchronous: data
// appears one cycle after the address.
module cell_line_buffer
  import hog_pkg::*;
#(
  parameter int unsigned IMG_W = 1920,  // widest row in pixels
  parameter int unsigned NROWS = 24,    // rows in the ring
  parameter int unsigned ROW_W = 12     // width of row / column counters
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   frame_start,
  input  logic [ROW_W-1:0]       width_px,   // multiple of 8
  input  logic [ROW_W-1:0]       height_px,  // multiple of 8
  input  logic [CRD_W-1:0]       scan_cy,    // cell row being scanned
  // write side (memory interface)
  input  logic                   wr_valid,
  input  logic [31:0]            wr_data,
  output logic                   wr_ready,
  output logic [ROW_W-1:0]       rows_done,
  // four read ports
  input  logic [3:0][ROW_W-1:0]  rd_row,
  input  logic [3:0][ROW_W-1:0]  rd_col,
  output logic [3:0][PIX_W-1:0]  rd_pix
);
  localparam int unsigned WPR = IMG_W / 4;          // words per row
  localparam int unsigned RB  = $clog2(NROWS);
  localparam int unsigned CB  = $clog2(WPR);

  function automatic logic [RB-1:0] slot(input logic [ROW_W-1:0] row);
    return RB'(row % ROW_W'(NROWS));
  endfunction

  logic [31:0] mem [NROWS][WPR];

  logic [ROW_W-1:0] wcol;   // word column
  logic [ROW_W-1:0] wrow;   // absolute row being written
  logic [RB-1:0]    wslot;  // its slot in the ring
  logic [ROW_W+1:0] limit;

  assign limit     = (ROW_W+2)'(scan_cy) * (ROW_W+2)'(CELL) + (ROW_W+2)'(NROWS - 2);
  assign wr_ready  = (wrow < height_px) && ((ROW_W+2)'(wrow) <= limit);
  assign rows_done = wrow;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcol  <= '0;
      wrow  <= '0;
      wslot <= '0;
    end else if (frame_start) begin
      wcol  <= '0;
      wrow  <= '0;
      wslot <= '0;
    end else if (wr_valid && wr_ready) begin
      if (wcol == (width_px >> 2) - 1'b1) begin
        wcol  <= '0;
        wrow  <= wrow + 1'b1;
        wslot <= (wslot == RB'(NROWS - 1)) ? '0 : wslot + 1'b1;
      end else begin
        wcol <= wcol + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_valid && wr_ready)
      mem[wslot][CB'(wcol)] <= wr_data;
  end

  for (genvar p = 0; p < 4; p++) begin : g_rd
    logic [31:0] word;
    logic [1:0]  sel;
    always_ff @(posedge clk) begin
      word <= mem[slot(rd_row[p])][CB'(rd_col[p] >> 2)];
      sel  <= rd_col[p][1:0];
    end
    assign rd_pix[p] = word[sel*8 +: 8];
  end
endmodule
