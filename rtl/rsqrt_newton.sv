// rsqrt_newton: reciprocal square root by Newton's method.
//
// Computes 1/sqrt(S) for an unsigned integer S as y * 2^-e, with y in Q1.15
// (0.5 < y <= 1). As in the source description the initial value comes from
// a shift-based approximation, which keeps the number of Newton iterations
// small, and the coefficient unit iterates in four stages. Here S is first
// scaled by 4^-e so that m = S/4^e lies in [1,4) (leading-one detection and
// a shift); the initial value is 7/8 for m in [1,2) and 5/8 for m in [2,4),
// both shift-and-add constants; then y <- y*(3 - m*y^2)/2 runs ITERS times.
// The formats and constants are this design's own.
//
// Timing: start loads S; done pulses ITERS+1 cycles later with y, e valid
// (held until the next start). zero is set when S = 0 (y and e then 0).
module rsqrt_newton #(
  parameter int unsigned S_W   = 40,  // width of the input
  parameter int unsigned ITERS = 4    // Newton iterations
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [S_W-1:0] s,
  output logic           done,
  output logic [15:0]    y,       // Q1.15
  output logic [5:0]     e,       // 1/sqrt(s) = y * 2^-e
  output logic           zero
);
  // leading one position
  logic [5:0] p;
  always_comb begin
    p = '0;
    for (int i = 0; i < S_W; i++)
      if (s[i]) p = 6'(i);
  end

  logic [5:0]  e0;
  logic [15:0] m0;     // Q2.14
  always_comb begin
    e0 = p >> 1;
    if (2 * int'(e0) >= 14) m0 = 16'(s >> (2 * e0 - 14));
    else                    m0 = 16'(s << (14 - 2 * e0));
  end

  logic [15:0] m_q;
  logic [$clog2(ITERS+1)-1:0] it;
  logic running;

  // one Newton step
  logic [31:0] ysq;
  logic [15:0] y2;       // Q1.15
  logic [31:0] my2;
  logic [17:0] t;        // m*y^2, Q3.15
  logic [17:0] three_minus_t;
  logic [33:0] prod;
  always_comb begin
    ysq  = y * y;                        // Q2.30
    y2   = 16'(ysq >> 15);
    my2  = m_q * y2;                     // Q3.29
    t    = 18'(my2 >> 14);
    three_minus_t = (18'(3) << 15) - t;
    prod = y * three_minus_t;            // Q.30
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y <= '0; e <= '0; zero <= 1'b0; m_q <= '0;
      it <= '0; running <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        zero    <= (s == '0);
        e       <= (s == '0) ? '0 : e0;
        m_q     <= m0;
        y       <= (s == '0) ? '0 : (p[0] ? 16'd20480 : 16'd28672);   // 5/8, 7/8
        it      <= '0;
        running <= 1'b1;
      end else if (running) begin
        if (!zero) y <= 16'(prod >> 16);
        it <= it + 1'b1;
        if (it == ($clog2(ITERS+1))'(ITERS - 1)) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end
endmodule
