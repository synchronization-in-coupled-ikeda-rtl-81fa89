// tb_workload_dtm_sync: synchronisation of two Ikeda systems whose delay is
// modulated as tau(t) = 1 |sin t|, the setting of the modulated-delay error
// experiments (mu = 20, alpha = 5, dt = 1/1024).
//
// The complete emulator is built with a modulation amplitude of 1 and run
// three times from reset, 16 tau each: uncoupled, one-way square-wave
// coupling (k1 = 0, k2 = 50) and one-way cosine coupling. On every sample
// the delayed state must be the state recorded tau_steps samples earlier
// (x0 before that), tau_steps must equal round(|sin t| * 1024) within one
// step (at least 1), and the response must follow its Euler update within
// 2e-6. The uncoupled run must stay apart (|x - y| > 0.1 somewhere in its
// last tau) and both coupled runs must end synchronised (|x - y| < 1e-3
// over their last tau).
module tb_workload_dtm_sync;
  import ikeda_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 1024, DIV = 64, STEPS = 16 * 1024;

  logic         clk = 0, rst = 1;
  couple_mode_e mode;
  couple_dir_e  dir = DIR_UNI;
  logic         dtm_en = 1'b1;
  fp32_t        x_init = FP_0P1, y_init = 32'h3F00_0000;
  logic         euler_clk, sample_valid, k_phase;
  logic [11:0]  tau_steps;
  fp32_t        x_out, xd_out, y_out, yd_out, e_out, k_out;
  logic [15:0]  dac_x, dac_xd, dac_y, dac_yd, dac_e;
  int checks = 0, failures = 0;
  fp32_t xh [0:STEPS];

  ikeda_top #(.DTM_AMP(32'sd134217728)) dut (.*);   // tau(t) = 1.0 |sin t|

  always #10 clk = ~clk;

  initial begin
    repeat (3 * (STEPS + 10) * DIV) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(couple_mode_e m, output real emax);
    real yp, ydp;
    int  sp;
    mode = m;
    @(negedge clk) rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    emax = 0.0;
    for (int s = 0; s < STEPS; s++) begin
      real tr;
      int  te;
      do @(posedge clk); while (!sample_valid);
      #1;
      xh[s] = x_out;
      tr = rabs($sin(real'(s) / 1024.0)) * 1024.0;
      te = int'(tr);
      if (te < 1) te = 1;
      checks += 2;
      if (int'(tau_steps) - te > 1 || te - int'(tau_steps) > 1) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: tau %0d steps, expected %0d", s, tau_steps, te);
      end
      if (xd_out !== ((s >= int'(tau_steps)) ? xh[s - int'(tau_steps)] : x_init)) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: delayed state %h", s, xd_out);
      end
      if (s > 0) begin
        real kr, yr;
        case (m)
          COUPLE_SQUARE: kr = ((sp / N) % 2 == 1) ? 50.0 : 0.0;
          COUPLE_COS:    kr = -5.0 + 40.0 * rabs($cos(ydp));
          default:       kr = 0.0;
        endcase
        yr = yp + (20.0 * $sin(ydp) - 5.0 * yp + kr * (f2r(xh[s - 1]) - yp)) / 1024.0;
        checks++;
        if (rabs(f2r(y_out) - yr) > 2e-6) begin
          failures++;
          if (failures < 10) $display("FAIL step %0d: y %f expected %f", s, f2r(y_out), yr);
        end
      end
      if (s >= STEPS - N && rabs(f2r(e_out)) > emax) emax = rabs(f2r(e_out));
      yp = f2r(y_out); ydp = f2r(yd_out); sp = s;
    end
    $display("%s: max |x - y| over the last tau = %g", m.name(), emax);
  endtask

  initial begin
    real emax;
    mode = COUPLE_NONE;
    run(COUPLE_NONE, emax);
    checks++;
    if (emax < 0.1) begin failures++; $display("FAIL uncoupled systems stayed together"); end
    run(COUPLE_SQUARE, emax);
    checks++;
    if (emax > 1e-3) begin failures++; $display("FAIL square-wave coupling did not synchronise"); end
    run(COUPLE_COS, emax);
    checks++;
    if (emax > 1e-3) begin failures++; $display("FAIL cosine coupling did not synchronise"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
