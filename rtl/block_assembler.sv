// block_assembler: collects 2x2 cell histograms into a block histogram.
//
// Cells arrive in raster order, each with its four position-weighted
// histograms (top-left, top-right, bottom-left, bottom-right versions).
// Block (bx,by) is made of the TL version of cell (bx,by), the TR version of
// cell (bx+1,by), the BL version of cell (bx,by+1) and the BR version of cell
// (bx+1,by+1), so it can be formed as soon as cell (bx+1,by+1) arrives. The
// TL and TR versions of every cell in the previous cell row are kept in a
// working SRAM (one word per cell column, read and rewritten as each new
// cell arrives); the BL version and the previous row's TL version of the
// preceding cell are kept in registers. This follows the source description
// (cell histograms are held in a working SRAM until 2x2 cells are
// collected); the split of versions between SRAM and registers is this
// design's own.
//
// Timing: a cell is accepted when the output register is empty; the block
// appears two cycles later. Element order is way*9 + bin.
module block_assembler
  import hog_pkg::*;
#(
  parameter int unsigned MAX_CX = 240   // cells per row (1920 / 8)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  cell_pkt_t  in_pkt,
  output logic       in_ready,
  output logic       out_valid,
  output blk_hist_t  out_pkt,
  input  logic       out_ready
);
  localparam int unsigned AW = $clog2(MAX_CX);
  localparam int unsigned HW = NBINS * HIST_W;     // one histogram

  typedef enum logic [1:0] {A_IDLE, A_READ, A_FORM} st_e;
  st_e st;

  logic [HW-1:0] tl_prev_q;        // TL version, previous row, column cx-1
  logic [HW-1:0] bl_cur_q;         // BL version, this row, column cx-1
  cell_pkt_t     cur;
  logic [2*HW-1:0] rd_word;

  wire accept = in_valid && in_ready;
  assign in_ready = (st == A_IDLE) && !out_valid;

  sram_1r1w #(.WIDTH(2 * HW), .DEPTH(MAX_CX)) u_hist_sram (
    .clk,
    .we(accept), .waddr(AW'(in_pkt.cx)), .wdata({in_pkt.h[1], in_pkt.h[0]}),
    .re(accept), .raddr(AW'(in_pkt.cx)), .rdata(rd_word)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= A_IDLE;
      cur <= '0;
      tl_prev_q <= '0;
      bl_cur_q <= '0;
      out_valid <= 1'b0;
      out_pkt <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      case (st)
        A_IDLE: if (accept) begin
          cur <= in_pkt;
          st  <= A_READ;
        end
        A_READ: st <= A_FORM;   // SRAM data is valid now (registered read)
        A_FORM: begin
          if (cur.cx != '0 && cur.cy != '0) begin
            out_valid  <= 1'b1;
            out_pkt.bx <= cur.cx - 1'b1;
            out_pkt.by <= cur.cy - 1'b1;
            out_pkt.h  <= {cur.h[3], bl_cur_q, rd_word[2*HW-1:HW], tl_prev_q};
          end
          tl_prev_q <= rd_word[HW-1:0];
          bl_cur_q  <= cur.h[2];
          st <= A_IDLE;
        end
        default: st <= A_IDLE;
      endcase
    end
  end
endmodule
