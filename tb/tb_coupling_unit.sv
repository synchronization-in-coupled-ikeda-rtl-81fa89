// tb_coupling_unit: self-checking test of the coupling factor k(t).
//
// Square mode (with N = 8 to keep it short): k must be k1 = 0 for the first
// N committed steps, k2 = 50 for the next N, and so on, and must not move
// without step_done. Cosine mode: for random cos(y(t - tau)) in [-1, 1], k
// must equal -alpha + 2*mu*|cos| (alpha = 5, mu = 20) within 1e-5. None
// mode: k = 0.
module tb_coupling_unit;
  import ikeda_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 8;

  logic         clk = 0, rst = 1, step_done = 0;
  couple_mode_e mode;
  fp32_t        cos_yd, k;
  logic         phase;
  int checks = 0, failures = 0;

  coupling_unit #(.MU(FP_MU_SYNC), .ALPHA(FP_ALPHA_SYNC), .K1(FP_ZERO), .K2(FP_K2), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = COUPLE_SQUARE;
    cos_yd = FP_ONE;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 5 * N; n++) begin
      // a few idle cycles: k must hold
      repeat (3) @(negedge clk);
      checks++;
      if (k !== (((n / N) % 2 == 1) ? FP_K2 : FP_ZERO)) begin
        failures++;
        $display("FAIL square step %0d: k %h", n, k);
      end
      step_done = 1;
      @(negedge clk) step_done = 0;
    end

    mode = COUPLE_COS;
    for (int i = 0; i < 2000; i++) begin
      real c, kr, err;
      c = real'($urandom_range(0, 200000)) / 100000.0 - 1.0;
      cos_yd = r2f(c);
      @(negedge clk);
      kr  = -5.0 + 40.0 * rabs(f2r(cos_yd));
      err = f2r(k) - kr;
      checks++;
      if (err > 1e-5 * (1.0 + rabs(kr)) || err < -1e-5 * (1.0 + rabs(kr))) begin
        failures++;
        $display("FAIL cos %f: k %f expected %f", c, f2r(k), kr);
      end
    end

    mode = COUPLE_NONE;
    @(negedge clk);
    checks++;
    if (k !== FP_ZERO) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
