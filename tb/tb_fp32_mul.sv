// tb_fp32_mul: self-checking test of the single-precision multiplier.
//
// Random normal operands (exponents kept away from overflow and underflow)
// plus hand-picked cases. The reference is the product formed in double
// precision, which is exact for two single-precision significands, rounded
// once to single precision by $shortrealtobits; the result must match bit for
// bit. Special cases check zero, sign and the gains used by the Ikeda design.
module tb_fp32_mul;
  import ikeda_pkg::*;
  import tb_fp_pkg::*;

  fp32_t a, b, y;
  int checks = 0, failures = 0;

  fp32_mul dut (.a(a), .b(b), .y(y));

  function automatic fp32_t rand_fp(int emin, int emax);
    logic [7:0] e;
    e = 8'(emin + int'($urandom_range(0, emax - emin)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  task automatic check(fp32_t ta, fp32_t tb_, fp32_t exp_y);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("FAIL mul %h * %h = %h, expected %h", ta, tb_, y, exp_y);
    end
  endtask

  function automatic fp32_t ref_mul(fp32_t ta, fp32_t tb_);
    real r;
    r = f2r(ta) * f2r(tb_);
    return r2f(r);
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(FP_MU_SYNC, FP_ONE, FP_MU_SYNC);                  // 20 * 1
    check(FP_DT_1024, 32'h4280_0000, 32'h3D80_0000);        // 64/1024 = 1/16
    check(FP_ALPHA_SYNC, 32'hBF00_0000, 32'hC020_0000);     // 5 * -0.5 = -2.5
    check(FP_ZERO, FP_MU_SYNC, FP_ZERO);                    // 0 * 20
    check(32'h8000_0000, FP_MU_SYNC, 32'h8000_0000);        // -0 * 20
    check(FP_0P1, FP_MU_SOLO, ref_mul(FP_0P1, FP_MU_SOLO)); // 0.1 * 6 (rounded)
    for (int i = 0; i < 20000; i++) begin
      fp32_t ra, rb;
      ra = rand_fp(80, 170);
      rb = rand_fp(80, 170);
      check(ra, rb, ref_mul(ra, rb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
