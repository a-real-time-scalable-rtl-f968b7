// tb_cell_hist_gen: feeds a random 40x32-pixel frame (5x4 cells) through
// the line buffer into the histogram generator and compares every four-way
// cell histogram with a floating-point reference (atan2/sqrt with the same
// shift weights). Orientation rounding near bin edges is tolerated as a
// small L1 difference per histogram (8% plus 2 per pixel for shift truncation). Also checks cell order and count.
module tb_cell_hist_gen;
  import hog_pkg::*;
  localparam int CX = 5, CY = 4, W = CX * 8, H = CY * 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [CRD_W-1:0] cells_x = CX, cells_y = CY, scan_cy;
  logic [11:0] rows_done;
  logic [3:0][11:0] rd_row, rd_col;
  logic [3:0][7:0] rd_pix;
  logic wr_valid = 0, wr_ready;
  logic [31:0] wr_data = 0;
  logic out_valid, out_ready = 1, busy, done;
  cell_pkt_t out_pkt;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cell_line_buffer #(.IMG_W(64)) u_lb (
    .clk, .rst_n, .frame_start(start), .width_px(12'(W)), .height_px(12'(H)),
    .scan_cy, .wr_valid, .wr_data, .wr_ready, .rows_done, .rd_row, .rd_col, .rd_pix);
  cell_hist_gen dut (.*);

  byte unsigned img [H][W];
  real ref_h [CX][CY][4][9];

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  task automatic build_ref();
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int gx, gy, b0, b1, q;
        real fx, fy, th, m, w0, w1;
        gx = int'(img[y][clampi(x+1,0,W-1)]) - int'(img[y][clampi(x-1,0,W-1)]);
        gy = int'(img[clampi(y+1,0,H-1)][x]) - int'(img[clampi(y-1,0,H-1)][x]);
        fx = gx; fy = gy;
        if (fy < 0 || (fy == 0 && fx < 0)) begin fx = -fx; fy = -fy; end
        th = $atan2(fy, fx) * 576.0 / 3.14159265358979;   // 0..576
        if (th >= 576.0) th -= 576.0;
        m = 1.64676 * $sqrt(fx*fx + fy*fy);
        b0 = int'($floor(th / 64.0)); b1 = (b0 + 1) % 9;
        q = int'($floor((th - b0 * 64.0) / 16.0));
        w1 = m * q / 4.0; w0 = m - w1;
        for (int w = 0; w < 4; w++) begin
          int s, px, py;
          px = x % 8; py = y % 8;
          s = ((w % 2 == 0) ? (px < 4) : (px >= 4)) + ((w < 2) ? (py < 4) : (py >= 4));
          ref_h[x/8][y/8][w][b0] += w0 / (1 << s);
          ref_h[x/8][y/8][w][b1] += w1 / (1 << s);
        end
      end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ncell = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      real l1, tot;
      checks++;
      if (out_pkt.cx != CRD_W'(ncell % CX) || out_pkt.cy != CRD_W'(ncell / CX)) begin
        failures++;
        $display("cell order: got (%0d,%0d) expected #%0d", out_pkt.cx, out_pkt.cy, ncell);
      end
      for (int w = 0; w < 4; w++) begin
        l1 = 0; tot = 0;
        for (int b = 0; b < 9; b++) begin
          real e;
          e = ref_h[out_pkt.cx][out_pkt.cy][w][b];
          tot += e;
          l1 += (real'(out_pkt.h[w][b]) > e) ? real'(out_pkt.h[w][b]) - e : e - real'(out_pkt.h[w][b]);
        end
        checks++;
        if (l1 > 0.08 * tot + 128.0) begin
          failures++;
          $display("cell (%0d,%0d) way %0d: L1 diff %f of total %f", out_pkt.cx, out_pkt.cy, w, l1, tot);
        end
      end
      ncell++;
    end
  end

  initial begin
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y][x] = byte'((x < 20) ? $urandom_range(255) : (x * 9 + y * 3 + $urandom_range(6)));
    foreach (ref_h[a, b, c, d]) ref_h[a][b][c][d] = 0.0;
    build_ref();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    fork
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x += 4) begin
          @(negedge clk);
          wr_valid = 1;
          wr_data = {img[y][x+3], img[y][x+2], img[y][x+1], img[y][x]};
          @(posedge clk);
          while (!wr_ready) @(posedge clk);
        end
      // toggle back-pressure now and then
      repeat (400) begin
        @(negedge clk) out_ready = ($urandom_range(3) != 0);
      end
    join
    @(negedge clk) begin wr_valid = 0; out_ready = 1; end
    wait (done);
    checks++;
    if (ncell != CX * CY) begin failures++; $display("cells %0d of %0d", ncell, CX * CY); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
