// fp32_mul: combinational IEEE 754 single-precision multiplier.
//
// The 24x24-bit significand product is normalised by at most one place and
// rounded to nearest, ties to even. This is the "X" block of the Euler
// datapath (state derivative times dt) and of every gain in the nonlinearity.
// Design choices of this implementation: subnormal inputs and results are
// flushed to a signed zero; an exponent overflow gives infinity; infinity
// times zero, or any NaN input, gives the quiet NaN 0x7FC00000. The dynamics
// emulated here never come near those cases.
//
// Interface: a, b operands; y = a * b. No clock, no latency.
module fp32_mul
  import ikeda_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic [47:0] prod;
  logic [22:0] mant;
  logic        guard, sticky, round_up;
  logic [23:0] mant_r;
  logic signed [10:0] exp_r;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    sy = sa ^ sb;

    prod = {1'b1, fa} * {1'b1, fb};
    if (prod[47]) begin
      mant   = prod[46:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_r  = 11'(ea) + 11'(eb) - 11'sd126;
    end else begin
      mant   = prod[45:23];
      guard  = prod[22];
      sticky = |prod[21:0];
      exp_r  = 11'(ea) + 11'(eb) - 11'sd127;
    end
    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + 24'(round_up);
    if (mant_r[23]) exp_r = exp_r + 11'sd1;  // rounding carried into the exponent

    if ((ea == 8'hFF && fa != '0) || (eb == 8'hFF && fb != '0))
      y = 32'h7FC0_0000;                               // NaN in
    else if (ea == 8'hFF || eb == 8'hFF)
      y = (ea == 8'h00 || eb == 8'h00) ? 32'h7FC0_0000 // inf * 0
                                       : {sy, 8'hFF, 23'd0};
    else if (ea == 8'h00 || eb == 8'h00)
      y = {sy, 31'd0};                                 // zero or flushed subnormal
    else if (exp_r >= 11'sd255)
      y = {sy, 8'hFF, 23'd0};                          // overflow
    else if (exp_r <= 11'sd0)
      y = {sy, 31'd0};                                 // underflow, flushed
    else
      y = {sy, exp_r[7:0], mant_r[22:0]};
  end

endmodule
