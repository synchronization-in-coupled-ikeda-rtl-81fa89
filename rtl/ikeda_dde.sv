// ikeda_dde: one Ikeda delay differential equation integrated by forward Euler,
//   x[n+1] = x[n] + dt * ( mu*sin(x[n-N]) - alpha*x[n] + c ),
// where c is an external coupling term (0 for a free-running system).
//
// Structure, following the block diagram of the hardware realization: a
// tapped delay line gives x[n-N], the nonlinearity block forms f, a
// multiplier scales f + c by dt, an adder adds x[n], and a state register
// (the output D flip-flop) holds x. Each Euler step starts on tick: the
// current state is written into the delay line and x[n-N] is read out; the
// next cycle starts the nonlinearity; when it is ready the block raises
// ready, and the state register loads the new value on the cycle where
// update is high. Keeping the load under external control lets two coupled
// systems commit together. A stand-alone system ties update to ready.
// Reset loads x_init into the state and makes the delay line return x_init
// for the first N steps (constant initial history).
//
// Interface: tick (step enable), update (commit), c (binary32), x_init,
// tap (the delay N = tau/dt in steps, 1 .. DEPTH, may change between steps);
// x, xd (x[n-N]), cos_d (cos x[n-N]), ready.
// Timing: ready rises CORDIC_ITER + 3 cycles after tick; the step must be
// committed before the next tick (checked by an assertion).
module ikeda_dde
  import ikeda_pkg::*;
#(
  parameter fp32_t       MU    = FP_MU_SYNC,
  parameter fp32_t       ALPHA = FP_ALPHA_SYNC,
  parameter fp32_t       DT    = FP_DT_1024,
  parameter int unsigned DEPTH = 2048,
  parameter int          CORDIC_ITER = 28
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  tick,
  input  logic                  update,
  input  fp32_t                 c,
  input  fp32_t                 x_init,
  input  logic [$clog2(DEPTH):0] tap,
  output fp32_t                 x,
  output fp32_t                 xd,
  output fp32_t                 cos_d,
  output logic                  ready
);

  logic  nl_start, nl_valid, pending;
  fp32_t f, f_c, dx, x_next, sin_d;

  delay_line #(.WIDTH(32), .DEPTH(DEPTH)) u_delay (
    .clk      (clk),
    .rst      (rst),
    .shift    (tick),
    .din      (x),
    .tap      (tap),
    .init_val (x_init),
    .dout     (xd)
  );

  ikeda_nonlinear #(.MU(MU), .ALPHA(ALPHA), .CORDIC_ITER(CORDIC_ITER)) u_nl (
    .clk   (clk),
    .rst   (rst),
    .start (nl_start),
    .x     (x),
    .xd    (xd),
    .valid (nl_valid),
    .f     (f),
    .sin_d (sin_d),
    .cos_d (cos_d)
  );

  fp32_add u_add_c  (.a(f),  .b(c),  .sub(1'b0), .y(f_c));     // derivative
  fp32_mul u_mul_dt (.a(f_c), .b(DT), .y(dx));                 // dt * derivative
  fp32_add u_add_x  (.a(x),  .b(dx), .sub(1'b0), .y(x_next));  // Euler sum

  always_ff @(posedge clk) begin
    if (rst) begin
      x        <= x_init;
      nl_start <= 1'b0;
      pending  <= 1'b0;
    end else begin
      nl_start <= tick;
      if (tick)
        pending <= 1'b1;
      else if (update && ready) begin
        x       <= x_next;
        pending <= 1'b0;
      end
    end
  end

  assign ready = pending && nl_valid && !nl_start;

  a_step_committed: assert property (@(posedge clk) disable iff (rst) tick |-> !pending)
    else $error("Euler step not committed before the next tick");

endmodule
