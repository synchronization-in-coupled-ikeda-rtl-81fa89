// tb_dac_format: self-checking test of the single-precision to DAC-word
// conversion.
//
// The expected word is computed from the real value: truncate x * 2^27
// toward zero, saturate to the 32-bit range, keep bits 31..16. Random values
// cover |x| < 20 (so saturation is exercised) and tiny values; fixed cases
// pin the scale (1.0 -> 0x0800, -1.0 -> 0xF800, 0.1 -> 0x00CC).
module tb_dac_format;
  import ikeda_pkg::*;
  import tb_fp_pkg::*;

  fp32_t a;
  logic [15:0] sample;
  int checks = 0, failures = 0;

  dac_format dut (.a(a), .sample(sample));

  function automatic logic [15:0] ref_word(fp32_t f);
    real r;
    longint q;
    r = f2r(f) * 134217728.0;
    if (r >= 2147483647.0)       q = 64'sd2147483647;
    else if (r <= -2147483648.0) q = -64'sd2147483648;
    else                         q = longint'($rtoi(r));   // $rtoi truncates toward zero
    return q[31:16];
  endfunction

  task automatic check(fp32_t f, logic [15:0] expw);
    a = f;
    #1;
    checks++;
    if (sample !== expw) begin
      failures++;
      if (failures < 10) $display("FAIL %h (%f): %h expected %h", f, f2r(f), sample, expw);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(FP_ONE, 16'h0800);
    check(32'hBF80_0000, 16'hF800);
    check(FP_0P1, 16'h00CC);
    check(FP_ZERO, 16'h0000);
    check(32'h4200_0000, 16'h7FFF);   // 32 saturates
    check(32'hC200_0000, 16'h8000);   // -32 saturates
    for (int i = 0; i < 20000; i++) begin
      real r;
      fp32_t f;
      r = (real'($urandom_range(0, 1000000)) / 1000000.0 - 0.5) * 40.0;
      if (i % 4 == 0) r = r * 1.0e-4;
      f = r2f(r);
      check(f, ref_word(f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
