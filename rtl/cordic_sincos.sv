// cordic_sincos: iterative CORDIC computing sin and cos of a 5.27 angle.
//
// On start the angle (any value the 5.27 format holds, |a| < 16 rad) is
// reduced into [-pi, pi] by adding or subtracting 2*pi up to three times,
// then folded into [-pi/2, pi/2] using sin(pi - r) = sin(r),
// cos(pi - r) = -cos(r). The folded angle is moved to a 3.29 format and
// rotated in ITER micro-rotations, one per clock, starting from
// (x, y) = (K, 0) so that the CORDIC gain is cancelled. After ITER cycles
// x = cos and y = sin; they are returned in 5.27 and done pulses for one
// cycle. The document names a CORDIC core for its nonlinearity; its
// internals, the width and the iteration count are this design's choices.
//
// Interface: start (one-cycle pulse, ignored while busy), angle;
// busy, done, sin_q, cos_q (held until the next start).
// Timing: done arrives ITER + 1 cycles after start.
module cordic_sincos
  import ikeda_pkg::*;
#(
  parameter int ITER = 28
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  q5_27_t angle,
  output logic   busy,
  output logic   done,
  output q5_27_t sin_q,
  output q5_27_t cos_q
);

  // atan(2^-i) in 3.29 fixed point: round(atan(2^-i) * 2^29)
  localparam logic signed [31:0] ATAN [0:27] = '{
    32'sd421657428, 32'sd248918915, 32'sd131521918, 32'sd66762579,
    32'sd33510843,  32'sd16771758,  32'sd8387925,   32'sd4194219,
    32'sd2097141,   32'sd1048575,   32'sd524288,    32'sd262144,
    32'sd131072,    32'sd65536,     32'sd32768,     32'sd16384,
    32'sd8192,      32'sd4096,      32'sd2048,      32'sd1024,
    32'sd512,       32'sd256,       32'sd128,       32'sd64,
    32'sd32,        32'sd16,        32'sd8,         32'sd4 };
  // CORDIC gain compensation: round(prod(1/sqrt(1 + 2^-2i)) * 2^29)
  localparam logic signed [31:0] K_INIT = 32'sd326016437;

  logic signed [31:0] xr, yr, zr;
  logic [4:0]         step;
  logic               neg_cos;
  q5_27_t             red;
  logic               fold_neg;

  // range reduction and folding of the incoming angle
  always_comb begin
    red = angle;
    for (int k = 0; k < 3; k++) begin
      if (red > Q_PI)       red = red - Q_TWO_PI;
      else if (red < -Q_PI) red = red + Q_TWO_PI;
    end
    fold_neg = 1'b0;
    if (red > Q_HALF_PI) begin
      red = Q_PI - red;
      fold_neg = 1'b1;
    end else if (red < -Q_HALF_PI) begin
      red = -Q_PI - red;
      fold_neg = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      step    <= '0;
      xr      <= '0;
      yr      <= '0;
      zr      <= '0;
      neg_cos <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy    <= 1'b1;
        step    <= '0;
        xr      <= K_INIT;
        yr      <= '0;
        zr      <= red <<< 2;            // 5.27 -> 3.29, |red| <= pi/2
        neg_cos <= fold_neg;
      end else if (busy) begin
        if (!zr[31]) begin
          xr <= xr - (yr >>> step);
          yr <= yr + (xr >>> step);
          zr <= zr - ATAN[step];
        end else begin
          xr <= xr + (yr >>> step);
          yr <= yr - (xr >>> step);
          zr <= zr + ATAN[step];
        end
        if (int'(step) == ITER - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        step <= step + 5'd1;
      end
    end
  end

  // results, 3.29 -> 5.27 with rounding; valid from done until the next start
  logic signed [31:0] sin_w, cos_w;
  always_comb begin
    sin_w = (yr + 32'sd2) >>> 2;
    cos_w = (xr + 32'sd2) >>> 2;
    if (neg_cos) cos_w = -cos_w;
  end
  assign sin_q = sin_w;
  assign cos_q = cos_w;

  initial assert (ITER >= 8 && ITER <= 28) else $error("ITER out of range");

endmodule
