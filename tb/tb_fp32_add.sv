// tb_fp32_add: self-checking test of the single-precision adder/subtractor.
//
// Random normal operands of both signs, with exponent differences from 0 to
// well beyond the significand width, in addition and subtraction, plus
// cancellation and zero cases. The reference is the double-precision sum
// rounded once to single precision; because that double rounding can differ
// from a single correct rounding when the operands are far apart, a
// difference of one unit in the last place is accepted only when their
// exponents differ by more than 28; everywhere else (the double sum is then
// exact) the result must match bit for bit.
module tb_fp32_add;
  import ikeda_pkg::*;
  import tb_fp_pkg::*;

  fp32_t a, b, y;
  logic  sub;
  int checks = 0, failures = 0;

  fp32_add dut (.a(a), .b(b), .sub(sub), .y(y));

  function automatic fp32_t rand_fp(int emin, int emax);
    logic [7:0] e;
    e = 8'(emin + int'($urandom_range(0, emax - emin)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  function automatic fp32_t ref_add(fp32_t ta, fp32_t tb_, logic s);
    real r;
    if (s) r = f2r(ta) - f2r(tb_);
    else   r = f2r(ta) + f2r(tb_);
    if (r == 0.0) return FP_ZERO;
    return r2f(r);
  endfunction

  task automatic check(fp32_t ta, fp32_t tb_, logic s, fp32_t exp_y, int tol);
    int diff;
    a = ta; b = tb_; sub = s;
    #1;
    checks++;
    diff = (y[31] == exp_y[31]) ? int'(y[30:0]) - int'(exp_y[30:0]) : 99;
    if (y == exp_y) diff = 0;
    if (diff > tol || diff < -tol) begin
      failures++;
      if (failures < 10)
        $display("FAIL add %h %s %h = %h, expected %h", ta, s ? "-" : "+", tb_, y, exp_y);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(FP_ONE, FP_ONE, 1'b0, FP_TWO, 0);                     // 1 + 1
    check(FP_ONE, FP_ONE, 1'b1, FP_ZERO, 0);                    // 1 - 1
    check(FP_MU_SYNC, FP_ALPHA_SYNC, 1'b1, 32'h4170_0000, 0);   // 20 - 5 = 15
    check(FP_ALPHA_SYNC, FP_MU_SYNC, 1'b1, 32'hC170_0000, 0);   // 5 - 20 = -15
    check(FP_ZERO, FP_ALPHA_SYNC, 1'b1, 32'hC0A0_0000, 0);      // 0 - 5
    check(FP_ALPHA_SYNC, FP_ZERO, 1'b0, FP_ALPHA_SYNC, 0);      // 5 + 0
    check(FP_ONE, 32'h3380_0000, 1'b0, FP_ONE, 0);              // 1 + 2^-24 ties to even
    check(FP_ONE, 32'h3400_0000, 1'b0, 32'h3F80_0001, 0);       // 1 + 2^-23
    check(FP_0P1, FP_DT_1024, 1'b0, ref_add(FP_0P1, FP_DT_1024, 1'b0), 0);
    for (int i = 0; i < 30000; i++) begin
      fp32_t ra, rb;
      logic  s;
      ra = rand_fp(100, 150);
      rb = (i % 3 == 0) ? {1'($urandom), ra[30:23], 23'($urandom)}   // equal exponents
                        : rand_fp(100, 150);
      s  = 1'($urandom);
      // the double-precision sum is exact when the exponents differ by at most
      // 28, so one rounding gives the exact expected result
      check(ra, rb, s, ref_add(ra, rb, s),
            (int'(ra[30:23]) - int'(rb[30:23]) <= 28 && int'(rb[30:23]) - int'(ra[30:23]) <= 28) ? 0 : 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
