// ikeda_fx_cosim: fixed-point Ikeda integrator of the co-simulation design.
//
// This is the second realisation the document shows: the datapath built for
// hardware co-simulation, with every word in signed fixed point instead of
// single precision. It integrates
//   dx/dt = 20 sin(x(t - tau)) - 5 x(t)
// by forward Euler, one step per tick:
//   x[n+1] = x[n] + K * (20 * sin(q(x[n-D])) - 5 * x[n])
// State and most words are Fix_24_16 (24-bit two's complement, 16 fraction
// bits). The chain, in the document's order:
//   xd  = x[n-D] from a tapped shift register, D = DELAY = 100;
//   Fix_13_8 = bits [20:8] of xd (drops 8 fraction bits, keeps range +/-16);
//   clamp to +/-3.98828125 (CLAMP = 1021 in units of 2^-8);
//   Fix_11_8 = low 11 bits of the clamped word, the CORDIC phase in radians;
//   sine in Fix_24_22; times MU_GAIN = 20 to Fix_24_16; minus
//   ALPHA_GAIN * x = 5x; times K = K_DT * 2^-16 = 655/65536 = 0.009995
//   (the step dt = 0.01 as that constant quantises); added to x.
// Each narrowing drops low bits (truncation toward minus infinity) and wraps
// on overflow. The sine comes from the shared CORDIC, whose phase input
// accepts the full clamped range.
//
// From the document: the word formats, the delay address 100, the clamp
// constants, the gains 20, 5 and 0.009995 and the accumulator form of the
// integrator. This design's choices: truncation and wrap as the quantisation
// rules; the delay counts 100 steps, so tau = 100 * dt = 1; the step is
// sequenced by a tick (one CORDIC run per step) rather than streamed at one
// sample per clock, so the pipeline registers of the original add no step
// delay; the memory stage in front of the gain K is taken as one of those
// registers; the history before the first step equals x_init.
//
// The module is a design of its own, a top for the co-simulation flow, and
// is not instantiated in ikeda_top (the analog-output design).
//
// Interface: tick (one-cycle step enable), x_init (Fix_24_16, reset value of
// x and of the history); x, xd (Fix_24_16), step_done.
// Timing: xd changes on the tick edge; x takes x[n+1] and step_done pulses
// CORDIC_ITER + 3 cycles after the tick, so ticks must be at least
// CORDIC_ITER + 4 cycles apart.
module ikeda_fx_cosim
  import ikeda_pkg::*;
#(
  parameter int DELAY       = 100,
  parameter int DEPTH       = 128,
  parameter int MU_GAIN     = 20,
  parameter int ALPHA_GAIN  = 5,
  parameter int K_DT        = 655,
  parameter int CLAMP       = 1021,
  parameter int CORDIC_ITER = 28
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               tick,
  input  logic signed [23:0] x_init,
  output logic signed [23:0] x,
  output logic signed [23:0] xd,
  output logic               step_done
);

  localparam logic [$clog2(DEPTH):0] TAP = ($clog2(DEPTH) + 1)'(DELAY);

  logic               cs_start, cs_busy, cs_done;
  logic signed [12:0] ph13, ph13_sat;
  logic signed [10:0] ph11;
  q5_27_t             angle, sin_q, cos_q;
  logic signed [23:0] sin22, m_mu, m_alpha, f, dx, x_next;
  logic signed [31:0] m_mu_full;
  logic signed [39:0] dx_full;

  delay_line #(.WIDTH(24), .DEPTH(DEPTH)) u_delay (
    .clk      (clk),
    .rst      (rst),
    .shift    (tick),
    .din      (x),
    .tap      (TAP),
    .init_val (x_init),
    .dout     (xd)
  );

  // phase word: slice to Fix_13_8, clamp, slice to Fix_11_8
  always_comb begin
    ph13     = xd[20:8];
    ph13_sat = ph13;
    if (ph13 > 13'(CLAMP))        ph13_sat = 13'(CLAMP);
    else if (ph13 < -13'(CLAMP))  ph13_sat = -13'(CLAMP);
    ph11  = ph13_sat[10:0];
    angle = q5_27_t'({{21{ph11[10]}}, ph11} <<< 19);
  end

  cordic_sincos #(.ITER(CORDIC_ITER)) u_cordic (
    .clk   (clk),
    .rst   (rst),
    .start (cs_start),
    .angle (angle),
    .busy  (cs_busy),
    .done  (cs_done),
    .sin_q (sin_q),
    .cos_q (cos_q)
  );

  // derivative and Euler sum
  always_comb begin
    sin22     = 24'(sin_q >>> 5);                       // Fix_24_22
    m_mu_full = 32'(sin22) * 32'(MU_GAIN);              // 22 fraction bits
    m_mu      = 24'(m_mu_full >>> 6);                   // Fix_24_16
    m_alpha   = 24'(32'(x) * 32'(ALPHA_GAIN));          // Fix_24_16
    f         = m_mu - m_alpha;
    dx_full   = 40'(f) * 40'(K_DT);                     // 32 fraction bits
    dx        = 24'(dx_full >>> 16);                    // Fix_24_16
    x_next    = x + dx;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x         <= x_init;
      cs_start  <= 1'b0;
      step_done <= 1'b0;
    end else begin
      cs_start  <= tick;
      step_done <= 1'b0;
      if (cs_done) begin
        x         <= x_next;
        step_done <= 1'b1;
      end
    end
  end

  logic unused_cos;
  assign unused_cos = ^{cos_q, cs_busy};

  a_tick_spacing: assert property (@(posedge clk) disable iff (rst) tick |-> !cs_busy)
    else $error("tick arrived while the previous step was still computing");

endmodule
