// tb_cordic_sincos: self-checking test of the CORDIC sine/cosine unit.
//
// Angles across the whole 5.27 range (|a| < 16 rad, so every range-reduction
// and folding branch is taken) plus the quadrant boundaries. Results are
// compared with $sin and $cos of the same angle; the error must stay below
// 2e-6. The latency from the start cycle to done must be ITER + 1 cycles.
module tb_cordic_sincos;
  import ikeda_pkg::*;

  localparam int ITER = 28;

  logic   clk = 0, rst = 1, start = 0;
  q5_27_t angle;
  logic   busy, done;
  q5_27_t sin_q, cos_q;
  int checks = 0, failures = 0;

  cordic_sincos #(.ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(real a);
    int   lat;
    real  es, ec;
    angle = q5_27_t'($rtoi(a * 134217728.0));
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
      if (lat > 100) break;
    end
    a  = real'(angle) / 134217728.0;
    es = real'(sin_q) / 134217728.0 - $sin(a);
    ec = real'(cos_q) / 134217728.0 - $cos(a);
    checks += 3;
    if (es > 2e-6 || es < -2e-6 || ec > 2e-6 || ec < -2e-6) begin
      failures++;
      $display("FAIL angle %f: sin %f cos %f", a, real'(sin_q) / 134217728.0, real'(cos_q) / 134217728.0);
    end
    if (lat != ITER + 1) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat, ITER + 1);
    end
    if (busy) failures++;
  endtask

  initial begin
    angle = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    run(0.0); run(1.5707963); run(-1.5707963); run(3.1415926); run(-3.1415926);
    run(0.1); run(-0.1); run(4.0); run(-4.0); run(15.9); run(-15.9);
    for (int i = 0; i < 2000; i++)
      run((real'($urandom_range(0, 1000000)) / 1000000.0 - 0.5) * 31.8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
