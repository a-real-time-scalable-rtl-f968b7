// l2_norm_stage: one L2 normalisation stage for a block vector.
//
// Takes an N-element unsigned vector v and produces v/||v|| in a fixed-point
// format with OUT_FRAC fraction bits, optionally clipped at CLIP (the L2-Hys
// clip) and always saturated to OUT_W bits. The sum of squares is built
// with one multiplier over N cycles, the reciprocal norm comes from the
// Newton unit (rsqrt_newton), and the N scaled outputs are produced with one
// multiplier over another N cycles. A zero vector gives a zero output (no
// epsilon term). The serial organisation and the formats are this design's
// own; the source description gives the normalisation method only.
//
// Timing: the result is ready 2N+ITERS+2 cycles after the accepting clock
// edge (78 for N = 36) and is held in its own register until out_ready. A
// new vector is accepted while the stage is idle and also in the last
// scaling cycle, and scaling waits only until the previous result has been
// taken, so a stage fed back to back takes one vector every 78 cycles.
module l2_norm_stage #(
  parameter int unsigned N        = 36,
  parameter int unsigned IN_W     = 16,
  parameter int unsigned OUT_W    = 12,
  parameter int unsigned OUT_FRAC = 12,
  parameter int unsigned CLIP     = 0,     // 0: no clip, else clip level (output units)
  parameter int unsigned S_W      = 40,
  parameter int unsigned TAG_W    = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [N-1:0][IN_W-1:0]    in_vec,
  input  logic [TAG_W-1:0]          in_tag,
  output logic                      in_ready,
  output logic                      out_valid,
  output logic [N-1:0][OUT_W-1:0]   out_vec,
  output logic [TAG_W-1:0]          out_tag,
  input  logic                      out_ready
);
  localparam int unsigned IW = $clog2(N);
  localparam logic [63:0] SAT = (CLIP != 0 && CLIP < (1 << OUT_W)) ? 64'(CLIP) : 64'((1 << OUT_W) - 1);

  typedef enum logic [2:0] {N_IDLE, N_SUMSQ, N_RSQRT, N_WAIT, N_SCALE} st_e;
  st_e st;

  logic [N-1:0][IN_W-1:0] v;
  logic [TAG_W-1:0]       tag;
  logic [IW-1:0]          i;
  logic [S_W-1:0]         sum;
  logic                   rs_done, rs_zero, rs_have;
  logic [15:0]            rs_y;
  logic [5:0]             rs_e;

  logic out_free, last;
  assign out_free = !out_valid || out_ready;
  assign last     = (i == IW'(N - 1));
  assign in_ready = (st == N_IDLE) || (st == N_SCALE && last);

  rsqrt_newton #(.S_W(S_W), .ITERS(4)) u_rsqrt (
    .clk, .rst_n, .start(st == N_RSQRT), .s(sum),
    .done(rs_done), .y(rs_y), .e(rs_e), .zero(rs_zero)
  );

  logic [63:0] scaled;
  logic [OUT_W-1:0] o;
  always_comb begin
    scaled = (64'(v[i]) * 64'(rs_y)) >> (6'd15 + rs_e - 6'(OUT_FRAC));
    o = rs_zero ? '0 : ((scaled > SAT) ? OUT_W'(SAT) : OUT_W'(scaled));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= N_IDLE; v <= '0; i <= '0; sum <= '0; rs_have <= 1'b0;
      out_valid <= 1'b0; out_vec <= '0; out_tag <= '0; tag <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      case (st)
        N_IDLE: if (in_valid) begin
          v <= in_vec; tag <= in_tag; sum <= '0; i <= '0;
          st <= N_SUMSQ;
        end
        N_SUMSQ: begin
          sum <= sum + S_W'(v[i] * v[i]);
          if (i == IW'(N - 1)) begin i <= '0; st <= N_RSQRT; end
          else i <= i + 1'b1;
        end
        N_RSQRT: st <= N_WAIT;
        N_WAIT: if (rs_done || rs_have) begin
          // scale only into a free output register
          rs_have <= !out_free;
          if (out_free) st <= N_SCALE;
        end
        N_SCALE: begin
          out_vec[i] <= o;
          if (last) begin
            i <= '0; out_valid <= 1'b1; out_tag <= tag;
            if (in_valid) begin
              v <= in_vec; tag <= in_tag; sum <= '0;
              st <= N_SUMSQ;
            end else st <= N_IDLE;
          end else i <= i + 1'b1;
        end
        default: st <= N_IDLE;
      endcase
    end
  end
endmodule
