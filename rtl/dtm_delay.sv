// dtm_delay: delay-time modulation, tau(t) = A * |sin(t)|, as a delay-line tap.
//
// A phase accumulator advances the model time t by dt at every Euler step and
// wraps it at 2*pi; a CORDIC computes sin(t) for the coming step while the
// current one runs. The delay in steps is tap = round(A * |sin t| / dt),
// clamped to 1 .. DEPTH because a delay line cannot return the present or a
// value older than it holds. With the defaults A = 1.5 and dt = 1/1024 the
// tap moves between 1 and 1536 of the 2048 stages. The modulation law and
// A = 1.5 (A = 1 is the other value used) are the document's; generating the
// sine from the step count with a CORDIC, rather than a free-running
// oscillator, and the clamping are this design's choices.
//
// Interface: tick (Euler step enable); tap (registered, valid for the step
// started by the next tick: tap for step n is computed from t = n*dt).
// Timing: the sine for step n+1 is started on tick n and is ready
// CORDIC_ITER + 1 cycles later, well inside a step.
module dtm_delay
  import ikeda_pkg::*;
#(
  parameter int unsigned DEPTH  = 2048,
  parameter q5_27_t      AMP    = 32'sd201326592,  // 1.5 in 5.27
  parameter int unsigned DT_LOG2 = 10,             // dt = 2^-DT_LOG2
  parameter int          CORDIC_ITER = 28
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   tick,
  output logic [$clog2(DEPTH):0] tap
);

  localparam int unsigned TW = $clog2(DEPTH) + 1;
  localparam q5_27_t DT_Q = q5_27_t'(1) <<< (27 - DT_LOG2);
  localparam int     SH   = 54 - int'(DT_LOG2);   // 2^-54 units -> steps of dt

  q5_27_t      phase, phase_next, sin_q, cos_q;
  logic        busy, done;
  logic [31:0] abs_sin;
  logic [63:0] prod, tap_next;

  // model time of the next step, wrapped into [0, 2*pi)
  always_comb begin
    phase_next = phase + DT_Q;
    if (phase_next >= Q_TWO_PI) phase_next = phase_next - Q_TWO_PI;
  end

  cordic_sincos #(.ITER(CORDIC_ITER)) u_sin (
    .clk(clk), .rst(rst), .start(tick), .angle(phase_next),
    .busy(busy), .done(done), .sin_q(sin_q), .cos_q(cos_q)
  );

  // |sin| (2^-27 units) * A (2^-27 units) / dt -> steps, rounded
  always_comb begin
    abs_sin  = sin_q[31] ? 32'(-sin_q) : 32'(sin_q);
    prod     = 64'(abs_sin) * 64'($unsigned(AMP));
    tap_next = (prod + (64'(1) << (SH - 1))) >> SH;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      tap   <= TW'(1);                 // tau(0) = 0, clamped
    end else begin
      if (tick) phase <= phase_next;
      if (done) begin
        if (tap_next == 0)                    tap <= TW'(1);
        else if (tap_next > 64'(DEPTH))       tap <= TW'(DEPTH);
        else                                  tap <= TW'(tap_next);
      end
    end
  end

  logic unused_cordic;
  assign unused_cordic = busy ^ (^cos_q);

  initial assert (DT_LOG2 >= 1 && DT_LOG2 <= 27) else $error("DT_LOG2 out of range");

endmodule
