// cordic_vectoring: gradient magnitude and unsigned orientation by CORDIC.
//
// Takes a gradient (gx, gy) and returns its magnitude and its orientation
// folded into 0..180 degrees, using only add, subtract, shift and a small
// arctangent table, as the source description prescribes for the gradient
// step. The folding, the pre-rotation and the angle unit are this design's
// own: the vector is scaled up by 2^3 for precision, mirrored into the upper half plane (HOG uses
// unsigned orientation), then rotated by -90 degrees if it lies in the second
// quadrant, after which ITER vectoring iterations drive y to zero. The angle
// unit is 1/576 of 180 degrees, so each of the 9 bins spans 64 units and the
// bin number is ang[9:6]. The magnitude keeps the CORDIC gain (~1.647); it
// is a common factor that block normalisation removes.
//
// Interface: in_valid/gx/gy/in_tag in, out_valid/mag/ang/out_tag out.
// Timing: fully pipelined, one vector per clock, latency ITER+2 cycles, no
// back-pressure (the caller keeps the pipeline free-running).
module cordic_vectoring
  import hog_pkg::*;
#(
  parameter int unsigned ITER  = 8,   // vectoring iterations
  parameter int unsigned TAG_W = 8    // side information carried alongside
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [PIX_W:0]   gx,
  input  logic signed [PIX_W:0]   gy,
  input  logic [TAG_W-1:0]        in_tag,
  output logic                    out_valid,
  output logic [MAG_W-1:0]        mag,
  output logic [ANG_W-2:0]        ang,   // 0 .. 575
  output logic [TAG_W-1:0]        out_tag
);
  localparam int unsigned GUARD = 3;             // fraction bits kept inside
  localparam int unsigned XW    = MAG_W + 1 + GUARD;

  // arctan(2^-i) in units of 180/576 degree, rounded
  function automatic logic signed [ANG_W-1:0] atan_tab(input int unsigned i);
    case (i)
      0: return 11'sd144;
      1: return 11'sd85;
      2: return 11'sd45;
      3: return 11'sd23;
      4: return 11'sd11;
      5: return 11'sd6;
      6: return 11'sd3;
      7: return 11'sd1;
      8: return 11'sd1;
      default: return 11'sd0;
    endcase
  endfunction

  logic                    v [ITER+1];
  logic signed [XW-1:0]    x [ITER+1];
  logic signed [XW-1:0]    y [ITER+1];
  logic signed [ANG_W-1:0] z [ITER+1];
  logic [TAG_W-1:0]        t [ITER+1];

  // stage 0: fold into the upper half plane, pre-rotate the second quadrant
  logic signed [XW-1:0] fx, fy;
  always_comb begin
    if (gy < 0 || (gy == 0 && gx < 0)) begin
      fx = XW'(-gx) <<< GUARD;
      fy = XW'(-gy) <<< GUARD;
    end else begin
      fx = XW'(gx) <<< GUARD;
      fy = XW'(gy) <<< GUARD;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v[0] <= 1'b0;
      x[0] <= '0;
      y[0] <= '0;
      z[0] <= '0;
      t[0] <= '0;
    end else begin
      v[0] <= in_valid;
      t[0] <= in_tag;
      if (fx < 0) begin            // 90..180 deg: rotate by -90
        x[0] <= fy;
        y[0] <= -fx;
        z[0] <= ANG_W'(ANG_HALF / 2);
      end else begin
        x[0] <= fx;
        y[0] <= fy;
        z[0] <= '0;
      end
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_iter
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v[i+1] <= 1'b0;
        x[i+1] <= '0;
        y[i+1] <= '0;
        z[i+1] <= '0;
        t[i+1] <= '0;
      end else begin
        v[i+1] <= v[i];
        t[i+1] <= t[i];
        if (y[i] >= 0) begin
          x[i+1] <= x[i] + (y[i] >>> i);
          y[i+1] <= y[i] - (x[i] >>> i);
          z[i+1] <= z[i] + atan_tab(i);
        end else begin
          x[i+1] <= x[i] - (y[i] >>> i);
          y[i+1] <= y[i] + (x[i] >>> i);
          z[i+1] <= z[i] - atan_tab(i);
        end
      end
    end
  end

  // output stage: wrap the angle into 0..575
  logic signed [ANG_W:0] zw;
  always_comb begin
    zw = (ANG_W+1)'(z[ITER]);
    if (zw < 0) zw = zw + (ANG_W+1)'(ANG_HALF);
    else if (zw >= (ANG_W+1)'(ANG_HALF)) zw = zw - (ANG_W+1)'(ANG_HALF);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      mag       <= '0;
      ang       <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= v[ITER];
      mag       <= (x[ITER] < 0) ? '0 : MAG_W'(x[ITER] >>> GUARD);
      ang       <= (ANG_W-1)'(zw);
      out_tag   <= t[ITER];
    end
  end
endmodule
