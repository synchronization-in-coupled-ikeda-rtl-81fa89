// tb_workload_mismatch: parameter-mismatch experiment on the coupled pair.
//
// Six drive/response pairs run side by side with mu = 20, alpha = 5,
// tau = 1, dt = 1/1024; their responses differ from the drive by
//   0 %, mu +10 %, mu +20 %, tau +10 %, tau +20 %, mu and tau +20 %.
// Four runs follow, each from reset for 12 tau: square-wave coupling
// (k1 = 0, k2 = 50) and cosine coupling, each one-way and two-way. Over the
// last 4 tau of each run the bench measures the correlation coefficient
//   C = <(x - <x>)(y - <y>)> / (sd(x) sd(y))
// between drive and response and prints the table. Checks: at every step the
// response of each pair follows its own Euler update (with its own mu and
// its own delay) within 2e-6; the matched pair ends synchronised (C > 0.9999);
// every C lies in [-1, 1]; and the 20 % mismatches correlate less than the
// matched pair.
module tb_workload_mismatch;
  import ikeda_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 1024, DIV = 40, TAUS = 12, P = 6;
  localparam fp32_t MU_R_TAB [P] = '{32'h41A0_0000, 32'h41B0_0000, 32'h41C0_0000,
                                     32'h41A0_0000, 32'h41A0_0000, 32'h41C0_0000};
  localparam int    N_R_TAB  [P] = '{1024, 1024, 1024, 1126, 1229, 1229};
  localparam real   MU_R_R   [P] = '{20.0, 22.0, 24.0, 20.0, 20.0, 24.0};

  logic         clk = 0, rst = 1, tick = 0;
  couple_mode_e mode;
  couple_dir_e  dir;
  fp32_t        x_init = FP_0P1, y_init = 32'h3F00_0000;
  fp32_t        x [P], xd [P], y [P], yd [P], e [P], k [P];
  logic         k_phase [P], step_done [P];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < P; i++) begin : g_pair
    ikeda_sync_pair #(.N(N), .MU_R(MU_R_TAB[i]), .N_R(N_R_TAB[i])) u_pair (
      .clk(clk), .rst(rst), .tick(tick), .mode(mode), .dir(dir),
      .dtm_en(1'b0), .dtm_tap(12'd1024), .x_init(x_init), .y_init(y_init),
      .x(x[i]), .xd(xd[i]), .y(y[i]), .yd(yd[i]), .e(e[i]), .k(k[i]),
      .k_phase(k_phase[i]), .step_done(step_done[i]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (4 * (TAUS * N + 20) * DIV) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(couple_mode_e m, couple_dir_e d);
    real sx [P], sy [P], sxx [P], syy [P], sxy [P], c [P];
    real x0 [P], y0 [P];
    int  cnt;
    mode = m; dir = d;
    @(negedge clk) rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < P; i++) begin sx[i] = 0; sy[i] = 0; sxx[i] = 0; syy[i] = 0; sxy[i] = 0; end
    cnt = 0;
    for (int n = 0; n < TAUS * N; n++) begin
      for (int i = 0; i < P; i++) begin x0[i] = f2r(x[i]); y0[i] = f2r(y[i]); end
      @(negedge clk) tick = 1;
      @(negedge clk) tick = 0;
      repeat (DIV - 3) @(negedge clk);     // all pairs have committed by now
      for (int i = 0; i < P; i++) begin
        real kr, yr;
        case (m)
          COUPLE_SQUARE: kr = ((n / N) % 2 == 1) ? 50.0 : 0.0;
          default:       kr = -5.0 + 40.0 * rabs($cos(f2r(yd[i])));
        endcase
        yr = y0[i] + (MU_R_R[i] * $sin(f2r(yd[i])) - 5.0 * y0[i] + kr * (x0[i] - y0[i])) / 1024.0;
        checks++;
        if (rabs(f2r(y[i]) - yr) > 2e-6) begin
          failures++;
          if (failures < 10) $display("FAIL pair %0d step %0d: y %f expected %f", i, n, f2r(y[i]), yr);
        end
        if (n >= (TAUS - 4) * N) begin
          sx[i] += f2r(x[i]); sy[i] += f2r(y[i]);
          sxx[i] += f2r(x[i]) * f2r(x[i]); syy[i] += f2r(y[i]) * f2r(y[i]);
          sxy[i] += f2r(x[i]) * f2r(y[i]);
        end
      end
      if (n >= (TAUS - 4) * N) cnt++;
    end
    for (int i = 0; i < P; i++) begin
      real vx, vy;
      vx = sxx[i] / cnt - (sx[i] / cnt) * (sx[i] / cnt);
      vy = syy[i] / cnt - (sy[i] / cnt) * (sy[i] / cnt);
      c[i] = (sxy[i] / cnt - (sx[i] / cnt) * (sy[i] / cnt)) / $sqrt(vx * vy);
      checks++;
      if (!(c[i] <= 1.000001 && c[i] >= -1.000001)) begin failures++; $display("FAIL C out of range"); end
    end
    $display("%-13s %-7s  C: matched %6.4f  mu+10%% %6.4f  mu+20%% %6.4f  tau+10%% %6.4f  tau+20%% %6.4f  both+20%% %6.4f",
             m.name(), d.name(), c[0], c[1], c[2], c[3], c[4], c[5]);
    checks += 4;
    if (c[0] < 0.9999) begin failures++; $display("FAIL matched pair not synchronised"); end
    if (c[2] >= c[0]) begin failures++; $display("FAIL mu mismatch did not lower C"); end
    if (c[4] >= c[0]) begin failures++; $display("FAIL tau mismatch did not lower C"); end
    if (c[5] >= c[0]) begin failures++; $display("FAIL joint mismatch did not lower C"); end
  endtask

  initial begin
    mode = COUPLE_SQUARE; dir = DIR_UNI;
    run(COUPLE_SQUARE, DIR_UNI);
    run(COUPLE_SQUARE, DIR_BI);
    run(COUPLE_COS, DIR_UNI);
    run(COUPLE_COS, DIR_BI);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
