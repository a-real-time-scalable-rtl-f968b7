// tb_cell_line_buffer: writes a 64x40 frame whose pixel value is a known
// function of (x, y), checks the flow control against the ring limit and
// reads every stored pixel back through all four ports. The ring is 24
// rows, so rows 24 and above wrap into slots 0.. (row mod 24).
module tb_cell_line_buffer;
  import hog_pkg::*;
  localparam int W = 64, H = 40;
  logic clk = 0, rst_n = 0, frame_start = 0;
  logic [11:0] width_px = W, height_px = H;
  logic [CRD_W-1:0] scan_cy = 0;
  logic wr_valid = 0, wr_ready;
  logic [31:0] wr_data = 0;
  logic [11:0] rows_done;
  logic [3:0][11:0] rd_row = '0, rd_col = '0;
  logic [3:0][7:0] rd_pix;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cell_line_buffer #(.IMG_W(128), .NROWS(24), .ROW_W(12)) dut (.*);

  function automatic logic [7:0] pix(int x, int y);
    return 8'((x * 7 + y * 13) ^ (y << 2));
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_rows(int y0, int y1);
    for (int y = y0; y <= y1; y++)
      for (int x = 0; x < W; x += 4) begin
        @(negedge clk);
        for (int p = 0; p < 4; p++) begin
          rd_row[p] = 12'(y); rd_col[p] = 12'(x + p);
        end
        @(negedge clk);
        for (int p = 0; p < 4; p++) begin
          checks++;
          if (rd_pix[p] !== pix(x + p, y)) begin
            failures++;
            $display("pixel (%0d,%0d) got %h exp %h", x + p, y, rd_pix[p], pix(x + p, y));
          end
        end
      end
  endtask

  int x = 0, y = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) frame_start = 1;
    @(negedge clk) frame_start = 0;
    // scan_cy = 0: rows 0..22 may be written, then the buffer must block
    fork
      begin
        while (y < H) begin
          @(negedge clk);
          wr_valid = 1;
          wr_data = {pix(x+3,y), pix(x+2,y), pix(x+1,y), pix(x,y)};
          @(posedge clk);
          if (wr_ready) begin
            x += 4;
            if (x == W) begin x = 0; y++; end
          end
        end
        @(negedge clk) wr_valid = 0;
      end
      begin
        repeat (W / 4 * 23 + 40) @(posedge clk);
        checks++;
        if (rows_done != 23) begin failures++; $display("rows_done %0d expected 23 (ring limit)", rows_done); end
        read_rows(0, 22);
        @(negedge clk) scan_cy = 1;      // rows up to 30 allowed now
        repeat (W / 4 * 8 + 40) @(posedge clk);
        checks++;
        if (rows_done != 31) begin failures++; $display("rows_done %0d expected 31", rows_done); end
        read_rows(7, 30);
        @(negedge clk) scan_cy = 4;
        wait (y == H);
        repeat (4) @(posedge clk);
        checks++;
        if (rows_done != H) begin failures++; $display("rows_done %0d expected %0d", rows_done, H); end
        read_rows(H - 24, H - 1);
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
