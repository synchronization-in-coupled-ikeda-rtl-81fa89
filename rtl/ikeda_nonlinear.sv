// ikeda_nonlinear: the Ikeda nonlinearity f = mu*sin(x(t - tau)) - alpha*x(t).
//
// On start the delayed state xd is converted from single precision to 5.27
// fixed point and handed to the CORDIC; when the CORDIC finishes, its sine and
// cosine are converted back to single precision and f is formed with two
// floating-point multipliers and a subtractor. The cosine of the delayed
// state is also returned because the cosine-based coupling factor needs it.
// The formula is the document's; computing sin with a fixed-point CORDIC
// between two format converters is this design's choice (the document names
// a CORDIC core in its blockset realization and leaves the HDL one open).
//
// Interface: start (pulse), x and xd (binary32, held stable while busy);
// valid (level, from completion until the next start), f, sin_d, cos_d.
// Timing: valid rises CORDIC_ITER + 2 cycles after the start cycle; f follows x
// combinationally while valid.
module ikeda_nonlinear
  import ikeda_pkg::*;
#(
  parameter fp32_t MU    = FP_MU_SYNC,
  parameter fp32_t ALPHA = FP_ALPHA_SYNC,
  parameter int    CORDIC_ITER = 28
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  fp32_t x,
  input  fp32_t xd,
  output logic  valid,
  output fp32_t f,
  output fp32_t sin_d,
  output fp32_t cos_d
);

  q5_27_t xd_q, sin_q, cos_q;
  logic   cordic_busy, cordic_done;
  fp32_t  mu_sin, alpha_x;

  fp32_to_fix u_to_fix (.a(xd), .q(xd_q));

  cordic_sincos #(.ITER(CORDIC_ITER)) u_cordic (
    .clk   (clk),
    .rst   (rst),
    .start (start),
    .angle (xd_q),
    .busy  (cordic_busy),
    .done  (cordic_done),
    .sin_q (sin_q),
    .cos_q (cos_q)
  );

  fix_to_fp32 u_sin_fp (.q(sin_q), .y(sin_d));
  fix_to_fp32 u_cos_fp (.q(cos_q), .y(cos_d));

  fp32_mul u_mu_sin  (.a(MU),    .b(sin_d), .y(mu_sin));
  fp32_mul u_alpha_x (.a(ALPHA), .b(x),     .y(alpha_x));
  fp32_add u_f       (.a(mu_sin), .b(alpha_x), .sub(1'b1), .y(f));

  always_ff @(posedge clk) begin
    if (rst)              valid <= 1'b0;
    else if (start)       valid <= 1'b0;
    else if (cordic_done) valid <= 1'b1;
  end

  a_no_restart: assert property (@(posedge clk) disable iff (rst) start |-> !cordic_busy)
    else $error("nonlinearity restarted while busy");

endmodule
