// ikeda_sync_pair: drive and response Ikeda systems with linear coupling.
//
//   drive     dx/dt = -alpha x + mu sin x(t-tau) + b k(t) (y - x)
//   response  dy/dt = -alpha y + mu sin y(t-tau) +   k(t) (x - y)
// with b = 0 for unidirectional and b = 1 for bidirectional coupling. Both
// systems are ikeda_dde instances stepped by the same tick; the coupling
// unit gives k(t). When both nonlinearities are ready, the two coupling terms
// are formed from the current states and both state registers are loaded in
// the same cycle, so each step uses x[n] and y[n] of the same step. The
// synchronisation error e = x - y is formed continuously. Separate response
// parameters (MU_R, N_R) allow mismatch experiments; by default the two
// systems are identical. With dtm_en both systems read their delayed state
// through dtm_tap instead, the modulated delay tau(t) of the delay-time
// modulation experiments. The equations are the document's; the lock-step
// commit is this design's choice.
//
// Interface: tick, mode, dir, dtm_en, dtm_tap, x_init, y_init (loaded
// during reset);
// x, xd, y, yd, e, k, step_done (pulse when a step is committed).
module ikeda_sync_pair
  import ikeda_pkg::*;
#(
  parameter fp32_t       MU    = FP_MU_SYNC,
  parameter fp32_t       ALPHA = FP_ALPHA_SYNC,
  parameter fp32_t       DT    = FP_DT_1024,
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned N     = 1024,
  parameter fp32_t       MU_R  = MU,
  parameter int unsigned N_R   = N,
  parameter fp32_t       K1    = FP_ZERO,
  parameter fp32_t       K2    = FP_K2,
  parameter int          CORDIC_ITER = 28
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         tick,
  input  couple_mode_e mode,
  input  couple_dir_e  dir,
  input  logic         dtm_en,
  input  logic [$clog2(DEPTH):0] dtm_tap,
  input  fp32_t        x_init,
  input  fp32_t        y_init,
  output fp32_t        x,
  output fp32_t        xd,
  output fp32_t        y,
  output fp32_t        yd,
  output fp32_t        e,
  output fp32_t        k,
  output logic         k_phase,
  output logic         step_done
);

  localparam int unsigned TW = $clog2(DEPTH) + 1;

  logic  rdy_x, rdy_y, commit;
  logic [TW-1:0] tap_x, tap_y;

  // fixed delays, or both systems on the modulated delay tau(t)
  assign tap_x = dtm_en ? dtm_tap : TW'(N);
  assign tap_y = dtm_en ? dtm_tap : TW'(N_R);
  fp32_t cos_xd, cos_yd, e_yx, c_x_bi, c_x, c_y;

  assign commit    = rdy_x && rdy_y;
  assign step_done = commit;

  ikeda_dde #(.MU(MU), .ALPHA(ALPHA), .DT(DT), .DEPTH(DEPTH),
              .CORDIC_ITER(CORDIC_ITER)) u_drive (
    .clk(clk), .rst(rst), .tick(tick), .update(commit), .c(c_x),
    .x_init(x_init), .tap(tap_x), .x(x), .xd(xd), .cos_d(cos_xd), .ready(rdy_x)
  );

  ikeda_dde #(.MU(MU_R), .ALPHA(ALPHA), .DT(DT), .DEPTH(DEPTH),
              .CORDIC_ITER(CORDIC_ITER)) u_response (
    .clk(clk), .rst(rst), .tick(tick), .update(commit), .c(c_y),
    .x_init(y_init), .tap(tap_y), .x(y), .xd(yd), .cos_d(cos_yd), .ready(rdy_y)
  );

  coupling_unit #(.MU(MU), .ALPHA(ALPHA), .K1(K1), .K2(K2), .N(N)) u_coupling (
    .clk(clk), .rst(rst), .mode(mode), .step_done(commit), .cos_yd(cos_yd),
    .k(k), .phase(k_phase)
  );

  fp32_add u_err  (.a(x), .b(y), .sub(1'b1), .y(e));      // e = x - y
  fp32_add u_eyx  (.a(y), .b(x), .sub(1'b1), .y(e_yx));   // y - x
  fp32_mul u_cy   (.a(k), .b(e),    .y(c_y));              // k (x - y)
  fp32_mul u_cx   (.a(k), .b(e_yx), .y(c_x_bi));           // k (y - x)
  assign c_x = (dir == DIR_BI) ? c_x_bi : FP_ZERO;

  // the drive's cosine feeds nothing here (Eq. 7 uses the response's)
  logic unused_cos_xd;
  assign unused_cos_xd = ^cos_xd;

endmodule
