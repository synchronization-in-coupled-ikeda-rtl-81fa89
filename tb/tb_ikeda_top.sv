// tb_ikeda_top: end-to-end test of the complete emulator at its default size
// (50 MHz-style clock divided by 64, N = 1024 of 2048 delay stages,
// dt = 1/1024, mu = 20, alpha = 5, k1 = 0, k2 = 50).
//
// Three runs exercise every mechanism of the design:
//   1. no coupling for 4 tau, then a run-time switch to one-way cosine
//      coupling without reset for 16 tau: first the systems drift apart, then
//      they synchronise;
//   2. two-way square-wave coupling for 16 tau from reset;
//   3. one-way square-wave coupling for 16 tau from reset;
//   4. delay-time modulation tau(t) = 1.5 |sin t| with one-way cosine
//      coupling for 16 tau from reset.
// On every output sample the bench checks: the sample period is 64 clocks;
// x(t - tau) equals the x sample taken tau_steps samples earlier (x0 before
// that, i.e. the initial history), with tau_steps = N unless modulated; x and y follow the Euler update
// computed in double precision from the previous sample and an independent
// model of k, within 2e-6; e = x - y; each DAC word is the upper half of the
// 5.27 value. Every run must end synchronised (|x - y| < 1e-3 over its last
// tau), and the free run must not (|x - y| > 0.1).
// It counts how often each mechanism occurred (initial history used,
// history from the delay line used, square-wave level changes, cosine
// coupling steps, two-way steps, mode switches, modulated-delay steps,
// synchronised endings) and
// counts a failure for any that never occurred.
module tb_ikeda_top;
  import ikeda_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 1024, DIV = 64;

  logic         clk = 0, rst = 1;
  couple_mode_e mode;
  couple_dir_e  dir;
  logic         dtm_en;
  fp32_t        x_init, y_init;
  logic         euler_clk, sample_valid, k_phase;
  logic [11:0]  tau_steps;
  fp32_t        x_out, xd_out, y_out, yd_out, e_out, k_out;
  logic [15:0]  dac_x, dac_xd, dac_y, dac_yd, dac_e;
  int checks = 0, failures = 0;

  int n_init_hist = 0, n_delay_hist = 0, n_phase_flips = 0, n_cos_steps = 0;
  int n_bi_steps = 0, n_switches = 0, n_synced = 0, n_apart = 0, n_dtm_steps = 0;

  ikeda_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat ((4 + 16 + 16 + 16 + 16 + 1) * N * DIV + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_word(fp32_t f);
    real r;
    longint q;
    r = f2r(f) * 134217728.0;
    if (r >= 2147483647.0)       q = 64'sd2147483647;
    else if (r <= -2147483648.0) q = -64'sd2147483648;
    else                         q = longint'($rtoi(r));
    return q[31:16];
  endfunction

  fp32_t xh [0:20*1024];   // x samples of the current run

  // wait for the next sample; returns the clocks since the previous one
  task automatic next_sample(output int gap);
    gap = 0;
    do begin
      @(posedge clk);
      gap++;
    end while (!sample_valid);
    #1;
  endtask

  task automatic check_dac();
    checks += 5;
    if (dac_x !== ref_word(x_out) || dac_xd !== ref_word(xd_out) || dac_y !== ref_word(y_out) ||
        dac_yd !== ref_word(yd_out) || dac_e !== ref_word(e_out)) begin
      failures++;
      if (failures < 10) $display("FAIL DAC words %h %h %h %h %h", dac_x, dac_xd, dac_y, dac_yd, dac_e);
    end
  endtask

  // previous sample: state, delayed state and coupling in force for its step
  real          xp, yp, xdp, ydp;
  couple_mode_e mp;
  couple_dir_e  dp;
  int           sp;
  logic         have_prev;

  // Sample s carries x[s], x[s - N], y[s], y[s - N] of Euler step s (the
  // values the step reads) and e = x[s] - y[s]. Runs samples s0 .. s0+steps-1
  // and returns max |e| over the last N of them.
  task automatic run_steps(int s0, int steps, output real emax_last);
    real kr, xr, yr;
    int gap;
    logic ph_prev;
    emax_last = 0.0;
    ph_prev = k_phase;
    for (int s = s0; s < s0 + steps; s++) begin
      next_sample(gap);
      checks++;
      if (s > 0 && gap != DIV) begin
        failures++;
        $display("FAIL sample gap %0d", gap);
      end
      xh[s] = x_out;
      checks++;
      if (xd_out !== ((s >= int'(tau_steps)) ? xh[s - int'(tau_steps)] : x_init) ||
          (!dtm_en && tau_steps != 12'(N))) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: x(t-tau) %h, tau %0d steps", s, xd_out, tau_steps);
      end
      if (s >= int'(tau_steps)) n_delay_hist++; else n_init_hist++;
      if (dtm_en && tau_steps != 12'(N)) n_dtm_steps++;
      if (have_prev) begin
        case (mp)
          COUPLE_SQUARE: kr = ((sp / N) % 2 == 1) ? 50.0 : 0.0;
          COUPLE_COS:    kr = -5.0 + 40.0 * rabs($cos(ydp));
          default:       kr = 0.0;
        endcase
        if (mp == COUPLE_COS) n_cos_steps++;
        if (dp == DIR_BI && kr != 0.0) n_bi_steps++;
        xr = xp + (20.0 * $sin(xdp) - 5.0 * xp + ((dp == DIR_BI) ? kr * (yp - xp) : 0.0)) / 1024.0;
        yr = yp + (20.0 * $sin(ydp) - 5.0 * yp + kr * (xp - yp)) / 1024.0;
        checks++;
        if (rabs(f2r(x_out) - xr) > 2e-6 || rabs(f2r(y_out) - yr) > 2e-6) begin
          failures++;
          if (failures < 10) $display("FAIL step %0d: x %f (%f) y %f (%f)", s, f2r(x_out), xr, f2r(y_out), yr);
        end
      end else begin
        checks++;
        if (x_out !== x_init || y_out !== y_init) begin
          failures++;
          $display("FAIL first sample is not the initial state");
        end
      end
      checks++;
      if (rabs(f2r(e_out) - (f2r(x_out) - f2r(y_out))) > 1e-6) begin
        failures++;
        if (failures < 10) $display("FAIL e %f", f2r(e_out));
      end
      check_dac();
      if (k_phase != ph_prev) n_phase_flips++;
      ph_prev = k_phase;
      if (s >= s0 + steps - N && rabs(f2r(e_out)) > emax_last) emax_last = rabs(f2r(e_out));
      xp = f2r(x_out); yp = f2r(y_out); xdp = f2r(xd_out); ydp = f2r(yd_out);
      mp = mode; dp = dir; sp = s;
      have_prev = 1'b1;
    end
  endtask

  task automatic start_run(couple_mode_e m, couple_dir_e d);
    mode = m; dir = d;
    x_init = FP_0P1;
    y_init = 32'h3F00_0000;   // 0.5
    @(negedge clk) rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    have_prev = 1'b0;
    checks++;
    if (x_out !== FP_ZERO || sample_valid) failures++;
  endtask

  task automatic expect_sync(real emax, string what);
    checks++;
    $display("%s: max |x - y| over the last tau = %g", what, emax);
    if (emax > 1e-3) begin failures++; $display("FAIL %s did not synchronise", what); end
    else n_synced++;
  endtask

  initial begin
    real emax;
    mode = COUPLE_NONE; dir = DIR_UNI; dtm_en = 1'b0; x_init = FP_0P1; y_init = FP_0P1;

    // run 1: free, then switch to one-way cosine coupling
    start_run(COUPLE_NONE, DIR_UNI);
    run_steps(0, 4 * N, emax);
    checks++;
    $display("uncoupled: max |x - y| over the last tau = %g", emax);
    if (emax < 0.1) begin failures++; $display("FAIL uncoupled systems stayed together"); end
    else n_apart++;
    mode = COUPLE_COS;
    n_switches++;
    run_steps(4 * N, 16 * N, emax);
    expect_sync(emax, "one-way cosine after switch");

    // run 2: two-way square wave
    start_run(COUPLE_SQUARE, DIR_BI);
    run_steps(0, 16 * N, emax);
    expect_sync(emax, "two-way square wave");

    // run 3: one-way square wave
    start_run(COUPLE_SQUARE, DIR_UNI);
    run_steps(0, 16 * N, emax);
    expect_sync(emax, "one-way square wave");

    // run 4: delay-time modulation, tau(t) = 1.5 |sin t|, one-way cosine coupling
    dtm_en = 1'b1;
    start_run(COUPLE_COS, DIR_UNI);
    run_steps(0, 16 * N, emax);
    expect_sync(emax, "modulated delay, one-way cosine");
    dtm_en = 1'b0;

    $display("mechanisms: initial-history steps %0d, delayed-history steps %0d, square-wave flips %0d,",
             n_init_hist, n_delay_hist, n_phase_flips);
    $display("            cosine-coupling steps %0d, two-way steps %0d, mode switches %0d, synchronised runs %0d, free runs apart %0d,",
             n_cos_steps, n_bi_steps, n_switches, n_synced, n_apart);
    $display("            modulated-delay steps %0d", n_dtm_steps);
    checks += 9;
    if (n_dtm_steps == 0)   failures++;
    if (n_init_hist == 0)   failures++;
    if (n_delay_hist == 0)  failures++;
    if (n_phase_flips == 0) failures++;
    if (n_cos_steps == 0)   failures++;
    if (n_bi_steps == 0)    failures++;
    if (n_switches == 0)    failures++;
    if (n_synced != 4)      failures++;
    if (n_apart == 0)       failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
