// tb_ikeda_nonlinear: self-checking test of f = mu*sin(xd) - alpha*x.
//
// For random x and xd in the range the Ikeda attractor visits (|x| < 8), f
// and cos(xd) are compared with values computed in double precision from the
// same inputs; the error allowed is 1e-5 * (1 + |f|). The block is run with
// the synchronization parameters (mu = 20, alpha = 5). The latency from the
// start cycle to valid must be CORDIC_ITER + 2 cycles.
module tb_ikeda_nonlinear;
  import ikeda_pkg::*;
  import tb_fp_pkg::*;

  localparam int ITER = 28;

  logic  clk = 0, rst = 1, start = 0;
  fp32_t x, xd, f, sin_d, cos_d;
  logic  valid;
  int checks = 0, failures = 0;

  ikeda_nonlinear #(.MU(FP_MU_SYNC), .ALPHA(FP_ALPHA_SYNC), .CORDIC_ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(real rx, real rxd);
    int  lat;
    real ef, ec, fr;
    x  = r2f(rx);
    xd = r2f(rxd);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!valid && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    fr = 20.0 * $sin(f2r(xd)) - 5.0 * f2r(x);
    ef = f2r(f) - fr;
    ec = f2r(cos_d) - $cos(f2r(xd));
    checks += 3;
    if (ef > 1e-5 * (1.0 + rabs(fr)) || ef < -1e-5 * (1.0 + rabs(fr)) || ec > 2e-6 || ec < -2e-6) begin
      failures++;
      $display("FAIL x %f xd %f: f %f (exp %f) cos %f", f2r(x), f2r(xd), f2r(f), fr, f2r(cos_d));
    end
    if (lat != ITER + 2) begin
      failures++;
      $display("FAIL latency %0d", lat);
    end
  endtask

  initial begin
    x = '0; xd = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    checks++;
    if (valid) failures++;
    run(0.1, 0.1);
    run(0.0, 0.0);
    run(-3.0, 2.5);
    for (int i = 0; i < 1000; i++)
      run((real'($urandom_range(0, 100000)) / 100000.0 - 0.5) * 16.0,
          (real'($urandom_range(0, 100000)) / 100000.0 - 0.5) * 16.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
