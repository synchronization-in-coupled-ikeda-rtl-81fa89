// tb_ikeda_sync_pair: self-checking test of the coupled drive/response pair.
//
// Five runs with mu = 20, alpha = 5, tau = 1 (N = 1024), dt = 1/1024 and
// initial conditions x0 = 0.1, y0 = 0.5: uncoupled, square-wave coupling
// (k1 = 0, k2 = 50) one way and both ways, cosine coupling
// k = -5 + 40|cos y(t - tau)| one way and both ways. At every step the new
// x and y are compared with the Euler update computed in double precision
// from the pair's own x, y, x(t - tau), y(t - tau) and an independent model
// of k (step count for the square wave, cos of y(t - tau) otherwise), within
// 2e-6, and e must equal x - y. Each run lasts 20 tau; in the last tau the
// coupled runs must be synchronised (|e| < 1e-3 throughout) and the
// uncoupled run must not be (|e| > 0.1 somewhere).
module tb_ikeda_sync_pair;
  import ikeda_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 1024, DIV = 40, TAUS = 20;

  logic         clk = 0, rst = 1, tick = 0;
  couple_mode_e mode;
  couple_dir_e  dir;
  logic         dtm_en = 0;
  logic [11:0]  dtm_tap = 12'd1024;
  fp32_t        x_init, y_init, x, xd, y, yd, e, k;
  logic         k_phase, step_done;
  int checks = 0, failures = 0;
  int synced_runs = 0;

  ikeda_sync_pair #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5 * (TAUS * N + 20) * DIV) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(couple_mode_e m, couple_dir_e d);
    real emax_last;
    mode = m; dir = d;
    x_init = FP_0P1;
    y_init = 32'h3F00_0000;   // 0.5
    @(negedge clk) rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    emax_last = 0.0;
    for (int n = 0; n < TAUS * N; n++) begin
      real xr, yr, kr, ex, ey, xdr, ydr, x0, y0;
      int  lat;
      x0 = f2r(x); y0 = f2r(y);
      @(negedge clk) tick = 1;
      @(negedge clk) tick = 0;
      lat = 1;
      while (!step_done && lat < DIV) begin @(negedge clk); lat++; end
      if (!step_done) begin failures++; $display("FAIL no commit in step %0d", n); end
      xdr = f2r(xd); ydr = f2r(yd);
      case (m)
        COUPLE_SQUARE: kr = ((n / N) % 2 == 1) ? 50.0 : 0.0;
        COUPLE_COS:    kr = -5.0 + 40.0 * rabs($cos(ydr));
        default:       kr = 0.0;
      endcase
      xr = x0 + (20.0 * $sin(xdr) - 5.0 * x0 + ((d == DIR_BI) ? kr * (y0 - x0) : 0.0)) / 1024.0;
      yr = y0 + (20.0 * $sin(ydr) - 5.0 * y0 + kr * (x0 - y0)) / 1024.0;
      @(negedge clk);
      ex = f2r(x) - xr;
      ey = f2r(y) - yr;
      checks += 3;
      if (rabs(ex) > 2e-6 || rabs(ey) > 2e-6) begin
        failures++;
        if (failures < 10)
          $display("FAIL mode %s dir %s step %0d: x %f (%f) y %f (%f)", m.name(), d.name(), n,
                   f2r(x), xr, f2r(y), yr);
      end
      if (rabs(f2r(e) - (f2r(x) - f2r(y))) > 1e-6) begin
        failures++;
        if (failures < 10) $display("FAIL e %f", f2r(e));
      end
      if (n >= (TAUS - 1) * N && rabs(f2r(e)) > emax_last) emax_last = rabs(f2r(e));
      repeat (DIV - lat - 2) @(negedge clk);
    end
    checks++;
    $display("mode %s dir %s: max |x - y| over the last tau = %g", m.name(), d.name(), emax_last);
    if (m == COUPLE_NONE) begin
      if (emax_last < 0.1) begin failures++; $display("FAIL uncoupled systems stayed together"); end
    end else begin
      if (emax_last > 1e-3) begin failures++; $display("FAIL not synchronised"); end
      else synced_runs++;
    end
  endtask

  initial begin
    mode = COUPLE_NONE; dir = DIR_UNI; x_init = FP_0P1; y_init = FP_0P1;
    run(COUPLE_NONE,   DIR_UNI);
    run(COUPLE_SQUARE, DIR_UNI);
    run(COUPLE_COS,    DIR_UNI);
    run(COUPLE_SQUARE, DIR_BI);
    run(COUPLE_COS,    DIR_BI);
    checks++;
    if (synced_runs != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
