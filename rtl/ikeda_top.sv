// ikeda_top: two coupled Ikeda delay systems with DAC outputs.
//
// The board clock (50 MHz) drives everything. A divide-by-64 clock divider
// gives the Euler step enable; on each step the drive system x and the
// response system y advance by dt = 1/1024 of model time, with tau = 1
// realised as a 1024-step tap of a 2048-stage delay line. The coupling factor
// k(t) is selected at run time (none, square wave, cosine form) and applied
// one way (drive -> response) or both ways. With dtm_en the delay of both
// systems follows tau(t) = A |sin t| (A = 1.5 by default) instead of the
// fixed N steps (delay-time modulation). After every committed step the
// outputs are sampled: x(t), x(t - tau), y(t), y(t - tau) and the
// synchronisation error e = x - y, each as a single-precision word and as a
// 16-bit DAC word (upper half of the 5.27 fixed-point value). The audio codec
// that turns the DAC words into voltages is outside this design; the words
// are brought out as ports. Defaults (mu = 20, alpha = 5, tau = 1, k1 = 0,
// k2 = 50, dt = 1/1024, divide by 64, 2048 stages, N = 1024) are the
// document's; the initial conditions are inputs sampled during reset.
//
// Interface: clk, rst (synchronous, active high), mode, dir, dtm_en, x_init,
// y_init; tau_steps (delay in steps used by the sampled step);
// euler_clk (divided clock for observation), sample_valid (one-cycle pulse
// per step), the fp32 and 16-bit outputs, k and its square-wave phase.
// Timing: one Euler step every DIV clocks. The outputs are registered on the
// cycle a step is committed and hold x[n], x[n-N], y[n], y[n-N] and
// x[n] - y[n], the values step n read; sample_valid is high for one cycle
// when they change (CORDIC_ITER + 4 = 32 clocks after the step's tick).
module ikeda_top
  import ikeda_pkg::*;
#(
  parameter int unsigned DIV   = 64,
  parameter fp32_t       MU    = FP_MU_SYNC,
  parameter fp32_t       ALPHA = FP_ALPHA_SYNC,
  parameter fp32_t       DT    = FP_DT_1024,
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned N     = 1024,
  parameter fp32_t       MU_R  = MU,
  parameter int unsigned N_R   = N,
  parameter fp32_t       K1    = FP_ZERO,
  parameter fp32_t       K2    = FP_K2,
  parameter q5_27_t      DTM_AMP = 32'sd201326592   // 1.5: tau(t) = 1.5 |sin t|
) (
  input  logic         clk,
  input  logic         rst,
  input  couple_mode_e mode,
  input  couple_dir_e  dir,
  input  logic         dtm_en,
  input  fp32_t        x_init,
  input  fp32_t        y_init,
  output logic         euler_clk,
  output logic         sample_valid,
  output fp32_t        x_out,
  output fp32_t        xd_out,
  output fp32_t        y_out,
  output fp32_t        yd_out,
  output fp32_t        e_out,
  output fp32_t        k_out,
  output logic         k_phase,
  output logic [$clog2(DEPTH):0] tau_steps,
  output logic [15:0]  dac_x,
  output logic [15:0]  dac_xd,
  output logic [15:0]  dac_y,
  output logic [15:0]  dac_yd,
  output logic [15:0]  dac_e
);

  localparam int unsigned TW = $clog2(DEPTH) + 1;

  logic  tick, step_done;
  logic [TW-1:0] dtm_tap;
  fp32_t x, xd, y, yd, e;
  logic [15:0] s_x, s_xd, s_y, s_yd, s_e;

  clock_divider #(.DIV(DIV)) u_div (
    .clk(clk), .rst(rst), .tick(tick), .clk_div(euler_clk)
  );

  dtm_delay #(.DEPTH(DEPTH), .AMP(DTM_AMP)) u_dtm (
    .clk(clk), .rst(rst), .tick(tick), .tap(dtm_tap)
  );

  // delay used by the step in progress, captured when the step starts
  logic [TW-1:0] tau_cur;
  always_ff @(posedge clk) begin
    if (rst)       tau_cur <= TW'(N);
    else if (tick) tau_cur <= dtm_en ? dtm_tap : TW'(N);
  end

  ikeda_sync_pair #(.MU(MU), .ALPHA(ALPHA), .DT(DT), .DEPTH(DEPTH), .N(N),
                    .MU_R(MU_R), .N_R(N_R), .K1(K1), .K2(K2)) u_pair (
    .clk(clk), .rst(rst), .tick(tick), .mode(mode), .dir(dir),
    .dtm_en(dtm_en), .dtm_tap(dtm_tap),
    .x_init(x_init), .y_init(y_init),
    .x(x), .xd(xd), .y(y), .yd(yd), .e(e), .k(k_out), .k_phase(k_phase),
    .step_done(step_done)
  );

  dac_format u_dac_x  (.a(x),  .sample(s_x));
  dac_format u_dac_xd (.a(xd), .sample(s_xd));
  dac_format u_dac_y  (.a(y),  .sample(s_y));
  dac_format u_dac_yd (.a(yd), .sample(s_yd));
  dac_format u_dac_e  (.a(e),  .sample(s_e));

  // output sample registers: state and delayed state of the same step
  always_ff @(posedge clk) begin
    if (rst) begin
      sample_valid <= 1'b0;
      tau_steps <= TW'(N);
      x_out  <= FP_ZERO; xd_out <= FP_ZERO; y_out <= FP_ZERO;
      yd_out <= FP_ZERO; e_out  <= FP_ZERO;
      dac_x  <= '0; dac_xd <= '0; dac_y <= '0; dac_yd <= '0; dac_e <= '0;
    end else begin
      sample_valid <= step_done;
      if (step_done) begin
        tau_steps <= tau_cur;
        x_out  <= x;   xd_out <= xd;  y_out <= y;   yd_out <= yd;  e_out <= e;
        dac_x  <= s_x; dac_xd <= s_xd; dac_y <= s_y; dac_yd <= s_yd; dac_e <= s_e;
      end
    end
  end

endmodule
