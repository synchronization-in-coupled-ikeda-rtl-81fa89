// tb_ikeda_dde: self-checking test of one free-running Ikeda system.
//
// The system runs with the single-system parameters mu = 6, alpha = 1,
// tau = 1, dt = 1/1024 (N = 1024, 2048-stage delay line), x(t <= 0) = 0.1,
// no coupling, and a step enable every 64 clocks. For each of 4 * N steps:
//   - xd must equal the state recorded N steps earlier (0.1 in the first N);
//   - the new state must equal x + dt*(6 sin(xd) - x), computed in double
//     precision from the block's own x and xd, within 1e-6;
//   - ready must rise within the 64-cycle step.
// At the end the trajectory must have left the initial point (the attractor
// spans several units).
module tb_ikeda_dde;
  import ikeda_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 1024, DEPTH = 2048, DIV = 64, STEPS = 4 * N;

  logic  clk = 0, rst = 1, tick = 0, update;
  fp32_t c, x_init, x, xd, cos_d;
  logic  ready;
  logic [$clog2(DEPTH):0] tap;
  int checks = 0, failures = 0;
  fp32_t hist [0:STEPS];
  real   xmin = 1.0e9, xmax = -1.0e9;

  ikeda_dde #(.MU(FP_MU_SOLO), .ALPHA(FP_ONE), .DT(FP_DT_1024), .DEPTH(DEPTH)) dut (.*);

  assign update = ready;   // stand-alone system commits as soon as it can

  always #5 clk = ~clk;

  initial begin
    repeat ((STEPS + 10) * DIV) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c = FP_ZERO;
    x_init = FP_0P1;
    tap = N;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    checks++;
    if (x !== FP_0P1) begin failures++; $display("FAIL reset state %h", x); end
    for (int n = 0; n < STEPS; n++) begin
      fp32_t x_now, xd_exp;
      real   xr, err;
      int    lat;
      x_now = x;
      hist[n] = x_now;
      @(negedge clk) tick = 1;
      @(negedge clk) tick = 0;
      xd_exp = (n >= N) ? hist[n - N] : FP_0P1;
      checks++;
      if (xd !== xd_exp) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: xd %h expected %h", n, xd, xd_exp);
      end
      lat = 1;
      while (!ready && lat < DIV) begin @(negedge clk); lat++; end
      checks++;
      if (!ready) begin failures++; $display("FAIL step %0d: not ready in time", n); end
      @(negedge clk);            // commit happened on this edge
      xr  = f2r(x_now) + (6.0 * $sin(f2r(xd)) - f2r(x_now)) / 1024.0;
      err = f2r(x) - xr;
      checks++;
      if (rabs(err) > 1e-6) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: x %f expected %f", n, f2r(x), xr);
      end
      if (f2r(x) < xmin) xmin = f2r(x);
      if (f2r(x) > xmax) xmax = f2r(x);
      repeat (DIV - lat - 2) @(negedge clk);
    end
    checks++;
    if (xmax - xmin < 1.0) begin
      failures++;
      $display("FAIL trajectory spans only %f .. %f", xmin, xmax);
    end
    $display("x range over %0d steps: %f .. %f", STEPS, xmin, xmax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
