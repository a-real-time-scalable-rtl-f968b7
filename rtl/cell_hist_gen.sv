// cell_hist_gen: cell-based scan, gradient and four-way weighted histogram.
//
// Scans the frame cell by cell (8x8 pixels, cells in raster order, pixels
// row by row inside a cell), as the source description's cell-based scanning
// prescribes. For every pixel it reads the four neighbours from the line
// buffer, forms the central differences gx = I(x+1,y)-I(x-1,y) and
// gy = I(x,y+1)-I(x,y-1) (coordinates clamped at the frame edge), and passes
// them through the CORDIC unit for magnitude and orientation.
//
// Each pixel votes into four histograms at once ("four-way" architecture):
// one per position the cell will take in the four blocks that share it. The
// weighting approximates bilinear interpolation with shifts only:
//  - orientation: the vote m is split between bin b and bin b+1 (mod 9) by
//    the two fraction bits q of the angle: (m,0), (m/2+m/4, m/4), (m/2, m/2),
//    (m/4, m/2+m/4) for q = 0..3;
//  - position: for each way the vote is halved once if the pixel lies in the
//    half of the cell away from the block centre horizontally, and once more
//    vertically.
// The description states that weights use the pixel position, the cell
// position and the orientation and are reduced to bit shifts; the exact
// weight table above is this design's own.
//
// Flow: a cell is started only when the rows it needs are in the line buffer
// and fewer than two cells are pending; a two-entry output queue absorbs the
// pipeline (read + CORDIC + vote, ITER+4 cycles). Throughput is one pixel
// per clock, 64 clocks per cell when nothing stalls.
// Interface: start (pulse) begins a frame of cells_x x cells_y cells;
// out_valid/out_ready/out_pkt carry cell histograms; done pulses when the
// last cell has been accepted.
module cell_hist_gen
  import hog_pkg::*;
#(
  parameter int unsigned ITER  = 8,
  parameter int unsigned ROW_W = 12
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [CRD_W-1:0]      cells_x,
  input  logic [CRD_W-1:0]      cells_y,
  // line buffer
  input  logic [ROW_W-1:0]      rows_done,
  output logic [CRD_W-1:0]      scan_cy,
  output logic [3:0][ROW_W-1:0] rd_row,
  output logic [3:0][ROW_W-1:0] rd_col,
  input  logic [3:0][PIX_W-1:0] rd_pix,
  // cell histograms
  output logic                  out_valid,
  output cell_pkt_t             out_pkt,
  input  logic                  out_ready,
  output logic                  busy,
  output logic                  done
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_SCAN, S_END} state_e;
  state_e state;

  logic [CRD_W-1:0] cx, cy;      // cell being scanned
  logic [2:0]       px, py;      // pixel inside the cell
  logic [1:0]       pending;     // cells started but not yet taken downstream
  logic [ROW_W-1:0] width_px, height_px;
  assign width_px  = ROW_W'(cells_x) << 3;
  assign height_px = ROW_W'(cells_y) << 3;

  // rows needed before cell row cy can start: up to 8*cy+8 (or the last row)
  logic [ROW_W:0] need_rows;
  always_comb begin
    need_rows = ((ROW_W+1)'(cy) << 3) + (ROW_W+1)'(9);
    if (need_rows > (ROW_W+1)'(height_px)) need_rows = (ROW_W+1)'(height_px);
  end

  logic fifo_pop;
  logic [1:0] fifo_count;
  assign fifo_pop = out_valid && out_ready;

  wire can_start = ((ROW_W+1)'(rows_done) >= need_rows) && (pending < 2'd2);
  wire issue     = (state == S_SCAN);
  wire last_pix  = issue && (px == 3'd7) && (py == 3'd7);
  wire cell_beg  = (state == S_WAIT) && can_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cx <= '0; cy <= '0; px <= '0; py <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state <= S_WAIT;
          cx <= '0; cy <= '0; px <= '0; py <= '0;
        end
        S_WAIT: if (can_start) state <= S_SCAN;
        S_SCAN: begin
          px <= px + 1'b1;
          if (px == 3'd7) begin
            py <= py + 1'b1;
            if (py == 3'd7) begin
              if (cx == cells_x - 1'b1) begin
                cx <= '0;
                cy <= cy + 1'b1;
                state <= (cy == cells_y - 1'b1) ? S_END : S_WAIT;
              end else begin
                cx <= cx + 1'b1;
                state <= S_WAIT;
              end
            end
          end
        end
        S_END: if (pending == '0) state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pending <= '0;
    else if (start && state == S_IDLE) pending <= '0;
    else pending <= pending + 2'(cell_beg) - 2'(fifo_pop);
  end

  assign busy    = (state != S_IDLE);
  assign scan_cy = (state == S_END) ? cells_y : cy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done <= 1'b0;
    else done <= (state == S_END) && (pending == '0);
  end

  // ---- read addresses (clamped neighbours) ----
  logic [ROW_W-1:0] x, y;
  assign x = (ROW_W'(cx) << 3) + ROW_W'(px);
  assign y = (ROW_W'(cy) << 3) + ROW_W'(py);
  always_comb begin
    rd_row[0] = y;  rd_col[0] = (x == '0) ? x : x - 1'b1;                   // left
    rd_row[1] = y;  rd_col[1] = (x == width_px - 1'b1) ? x : x + 1'b1;      // right
    rd_row[2] = (y == '0) ? y : y - 1'b1;                 rd_col[2] = x;    // up
    rd_row[3] = (y == height_px - 1'b1) ? y : y + 1'b1;   rd_col[3] = x;    // down
  end

  // ---- stage 1: gradient ----
  logic       s1_valid;
  logic [6:0] s1_tag;   // {last, py, px}
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_tag   <= '0;
    end else begin
      s1_valid <= issue;
      s1_tag   <= {last_pix, py, px};
    end
  end
  logic signed [PIX_W:0] gx, gy;
  assign gx = $signed({1'b0, rd_pix[1]}) - $signed({1'b0, rd_pix[0]});
  assign gy = $signed({1'b0, rd_pix[3]}) - $signed({1'b0, rd_pix[2]});

  logic             c_valid;
  logic [MAG_W-1:0] mag;
  logic [ANG_W-2:0] ang;
  logic [6:0]       c_tag;
  cordic_vectoring #(.ITER(ITER), .TAG_W(7)) u_cordic (
    .clk, .rst_n,
    .in_valid(s1_valid), .gx, .gy, .in_tag(s1_tag),
    .out_valid(c_valid), .mag, .ang, .out_tag(c_tag)
  );

  // ---- vote ----
  logic [3:0] bin0, bin1;
  logic [1:0] q;
  logic [MAG_W-1:0] w0, w1;
  always_comb begin
    bin0 = 4'(ang >> 6);
    bin1 = (bin0 == 4'(NBINS - 1)) ? 4'd0 : bin0 + 1'b1;
    q    = ang[5:4];
    case (q)
      2'd0: begin w0 = mag;                     w1 = '0;                      end
      2'd1: begin w0 = (mag >> 1) + (mag >> 2); w1 = mag >> 2;                end
      2'd2: begin w0 = mag >> 1;                w1 = mag >> 1;                end
      default: begin w0 = mag >> 2;             w1 = (mag >> 1) + (mag >> 2); end
    endcase
  end

  logic [2:0] vpx, vpy;
  assign vpx = c_tag[2:0];
  assign vpy = c_tag[5:3];

  logic [NWAYS-1:0][NBINS-1:0][HIST_W-1:0] acc, acc_nxt;
  always_comb begin
    acc_nxt = acc;
    for (int w = 0; w < NWAYS; w++) begin
      // way 0 TL, 1 TR, 2 BL, 3 BR: the block centre is right of a left cell
      // and below a top cell
      logic far_x, far_y;
      logic [1:0] s;
      far_x = (w % 2 == 0) ? (vpx < 3'd4) : (vpx >= 3'd4);
      far_y = (w < 2)      ? (vpy < 3'd4) : (vpy >= 3'd4);
      s = 2'(far_x) + 2'(far_y);
      for (int b = 0; b < NBINS; b++) begin
        if (4'(b) == bin0) acc_nxt[w][b] = acc_nxt[w][b] + HIST_W'(w0 >> s);
        if (4'(b) == bin1) acc_nxt[w][b] = acc_nxt[w][b] + HIST_W'(w1 >> s);
      end
    end
  end

  logic [CRD_W-1:0] dcx, dcy;   // coordinates of the cell being completed
  logic             push;
  cell_pkt_t        push_pkt;
  assign push = c_valid && c_tag[6];
  always_comb begin
    push_pkt.cx = dcx;
    push_pkt.cy = dcy;
    push_pkt.h  = acc_nxt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; dcx <= '0; dcy <= '0;
    end else if (start && state == S_IDLE) begin
      acc <= '0; dcx <= '0; dcy <= '0;
    end else if (c_valid) begin
      acc <= push ? '0 : acc_nxt;
      if (push) begin
        if (dcx == cells_x - 1'b1) begin
          dcx <= '0;
          dcy <= dcy + 1'b1;
        end else begin
          dcx <= dcx + 1'b1;
        end
      end
    end
  end

  logic fifo_wr_ready;
  sync_fifo #(.WIDTH($bits(cell_pkt_t)), .DEPTH(2)) u_outq (
    .clk, .rst_n, .clear(1'b0),
    .wr_valid(push), .wr_data(push_pkt), .wr_ready(fifo_wr_ready),
    .rd_valid(out_valid), .rd_data(out_pkt), .rd_ready(out_ready),
    .count(fifo_count)
  );

  // the pending-cell credit guarantees room for every finished cell
  assert property (@(posedge clk) disable iff (!rst_n) push |-> fifo_wr_ready);
endmodule
