// tb_dtm_delay: self-checking test of the delay-time modulation tap.
//
// For 8000 Euler steps (more than one period 2*pi of sin t at dt = 1/1024,
// so the phase wrap is exercised) the tap in force at step n must equal
// round(1.5 * |sin(n/1024)| * 1024), clamped to 1 .. 2048, computed here in
// double precision; one step of difference is allowed where the product
// lands close to a rounding boundary. Also checked: the tap after reset is 1,
// it reaches both ends of its range (1 and about 1536), and it is updated
// within the step.
module tb_dtm_delay;
  import ikeda_pkg::*;

  localparam int DEPTH = 2048, DIV = 40, STEPS = 8000;

  logic clk = 0, rst = 1, tick = 0;
  logic [$clog2(DEPTH):0] tap;
  int checks = 0, failures = 0;
  int tmin = 99999, tmax = 0;

  dtm_delay #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat ((STEPS + 10) * DIV) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    checks++;
    if (tap != 1) begin failures++; $display("FAIL tap after reset %0d", tap); end
    for (int n = 0; n < STEPS; n++) begin
      real r;
      int  e, d;
      r = 1.5 * $sin(real'(n) / 1024.0) * 1024.0;
      if (r < 0.0) r = -r;
      e = int'(r);               // round to nearest
      if (e < 1) e = 1;
      if (e > DEPTH) e = DEPTH;
      d = int'(tap) - e;
      checks++;
      if (d > 1 || d < -1) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: tap %0d expected %0d", n, tap, e);
      end
      if (int'(tap) < tmin) tmin = int'(tap);
      if (int'(tap) > tmax) tmax = int'(tap);
      @(negedge clk) tick = 1;
      @(negedge clk) tick = 0;
      repeat (DIV - 2) @(negedge clk);
    end
    $display("tap range %0d .. %0d", tmin, tmax);
    checks += 2;
    if (tmin != 1) failures++;
    if (tmax < 1535 || tmax > 1536) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
