// tb_block_assembler: sends two frames of random four-way cell histograms
// (6x4 cells) with random back-pressure and checks that every block
// (bx,by) is {TL of (bx,by), TR of (bx+1,by), BL of (bx,by+1), BR of
// (bx+1,by+1)} in raster order.
module tb_block_assembler;
  import hog_pkg::*;
  localparam int CX = 6, CY = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  cell_pkt_t in_pkt = '0;
  blk_hist_t out_pkt;
  cell_pkt_t cells [CX][CY];
  int checks = 0, failures = 0, nblk = 0;
  always #5 clk = ~clk;
  block_assembler #(.MAX_CX(16)) dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int bx, by;
      logic [BLK_DIM-1:0][HIST_W-1:0] e;
      bx = nblk % (CX - 1); by = (nblk / (CX - 1)) % (CY - 1);
      for (int b = 0; b < NBINS; b++) begin
        e[0*NBINS+b] = cells[bx][by].h[0][b];
        e[1*NBINS+b] = cells[bx+1][by].h[1][b];
        e[2*NBINS+b] = cells[bx][by+1].h[2][b];
        e[3*NBINS+b] = cells[bx+1][by+1].h[3][b];
      end
      checks++;
      if (out_pkt.bx != CRD_W'(bx) || out_pkt.by != CRD_W'(by) || out_pkt.h != e) begin
        failures++;
        $display("block %0d: got (%0d,%0d) exp (%0d,%0d) data %s", nblk, out_pkt.bx, out_pkt.by, bx, by,
                 out_pkt.h == e ? "ok" : "wrong");
      end
      nblk++;
    end
  end

  always @(negedge clk) out_ready <= ($urandom_range(2) != 0);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < CY; y++)
        for (int x = 0; x < CX; x++) begin
          cell_pkt_t p;
          p.cx = CRD_W'(x); p.cy = CRD_W'(y);
          for (int w = 0; w < 4; w++) for (int b = 0; b < 9; b++) p.h[w][b] = HIST_W'($urandom);
          @(negedge clk);
          in_valid = 1; in_pkt = p;
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          cells[x][y] = p;
        end
      @(negedge clk) in_valid = 0;
      repeat (20) @(posedge clk);
    end
    checks++;
    if (nblk != 2 * (CX - 1) * (CY - 1)) begin failures++; $display("blocks %0d", nblk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
