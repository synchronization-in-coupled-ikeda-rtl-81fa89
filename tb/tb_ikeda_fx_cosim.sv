// tb_ikeda_fx_cosim: self-checking test of the fixed-point co-simulation
// integrator (mu = 20, alpha = 5, dt = 0.009995, delay 100 steps).
//
// Three runs, from x_init = 0.1, 5.0 and -6.0 (the last two start the
// history outside the +/-3.98828125 clamp). For every step:
//   - xd must equal the state recorded 100 steps earlier (x_init before);
//   - the new state must equal the fixed-point step rebuilt here from the
//     block's own x and xd: same slices, clamp, truncations and wrap, with
//     the sine from $sin truncated to Fix_24_22. The CORDIC may differ from
//     $sin by a few units of 2^-22, so a result matching the rebuilt step
//     with the sine moved by up to 3 units is accepted; the number of
//     exact matches is reported;
//   - step_done must come CORDIC_ITER + 3 cycles after the tick.
// The first run lasts 30 tau; over its last 10 tau the state must stay
// inside +/-4.5 and still swing over more than 2 units (chaotic, not
// settled at a fixed point).
module tb_ikeda_fx_cosim;
  import ikeda_pkg::*;

  localparam int DELAY = 100, DIV = 40, ITER = 28;
  localparam int STEPS [3] = '{3000, 400, 400};
  localparam logic signed [23:0] INITS [3] = '{24'sd6554, 24'sd327680, -24'sd393216};

  logic clk = 0, rst = 1, tick = 0;
  logic signed [23:0] x_init, x, xd;
  logic step_done;
  int checks = 0, failures = 0, exact = 0, total = 0;
  logic signed [23:0] hist [0:3000];

  ikeda_fx_cosim dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4000 * DIV * 2) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one step rebuilt with a given sine offset (in units of 2^-22)
  function automatic logic signed [23:0] ref_step(logic signed [23:0] xs,
                                                  logic signed [23:0] xds,
                                                  int sin_off);
    logic signed [12:0] p13;
    logic signed [10:0] p11;
    logic signed [23:0] s22, mmu, mal, ff, d;
    real ph;
    p13 = xds[20:8];
    if (p13 > 13'sd1021) p13 = 13'sd1021;
    if (p13 < -13'sd1021) p13 = -13'sd1021;
    p11 = p13[10:0];
    ph  = real'(p11) / 256.0;
    s22 = 24'($floor($sin(ph) * 4194304.0)) + 24'(sin_off);
    mmu = 24'((32'(s22) * 32'sd20) >>> 6);
    mal = 24'(32'(xs) * 32'sd5);
    ff  = mmu - mal;
    d   = 24'((40'(ff) * 40'sd655) >>> 16);
    return xs + d;
  endfunction

  initial begin
    real xmin, xmax;
    for (int r = 0; r < 3; r++) begin
      x_init = INITS[r];
      rst = 1;
      repeat (3) @(posedge clk);
      @(negedge clk) rst = 0;
      checks++;
      if (x !== x_init) begin failures++; $display("FAIL run %0d reset state %0d", r, x); end
      xmin = 1.0e9; xmax = -1.0e9;
      for (int n = 0; n < STEPS[r]; n++) begin
        logic signed [23:0] x_now, xd_exp, want;
        bit ok;
        int lat;
        x_now = x;
        hist[n] = x_now;
        @(negedge clk) tick = 1;
        @(negedge clk) tick = 0;
        xd_exp = (n >= DELAY) ? hist[n - DELAY] : x_init;
        checks++;
        if (xd !== xd_exp) begin
          failures++;
          if (failures < 10) $display("FAIL run %0d step %0d: xd %0d expected %0d", r, n, xd, xd_exp);
        end
        lat = 1;
        while (!step_done && lat < DIV) begin
          @(negedge clk);
          lat++;
        end
        checks++;
        if (lat != ITER + 3) begin
          failures++;
          if (failures < 10) $display("FAIL run %0d step %0d: latency %0d", r, n, lat);
        end
        ok = 0;
        for (int o = -3; o <= 3; o++)
          if (x === ref_step(x_now, xd, o)) ok = 1;
        total++;
        if (x === ref_step(x_now, xd, 0)) exact++;
        checks++;
        if (!ok) begin
          failures++;
          if (failures < 10)
            $display("FAIL run %0d step %0d: x %0d expected %0d", r, n, x, ref_step(x_now, xd, 0));
        end
        if (r == 0 && n >= STEPS[r] - 1000) begin
          real xr;
          xr = real'(x) / 65536.0;
          if (xr < xmin) xmin = xr;
          if (xr > xmax) xmax = xr;
        end
        repeat (DIV - lat - 2) @(negedge clk);
      end
      if (r == 0) begin
        $display("run 0: x range over the last 10 tau [%f, %f]", xmin, xmax);
        checks++;
        if (xmin < -4.5 || xmax > 4.5 || xmax - xmin < 2.0) begin
          failures++;
          $display("FAIL run 0: attractor range [%f, %f]", xmin, xmax);
        end
      end
    end
    $display("steps matching the rebuilt step with the exact sine: %0d of %0d", exact, total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
