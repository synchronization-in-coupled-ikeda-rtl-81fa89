// fp32_add: combinational IEEE 754 single-precision adder / subtractor.
//
// y = a + b, or a - b when sub = 1. The operand of larger magnitude is kept,
// the other is aligned to it with guard, round and sticky bits, the
// significands are added or subtracted, the result is renormalised with a
// leading-zero count and rounded to nearest, ties to even. This is the "+"
// block of the Euler datapath and the subtractors of the coupling term and of
// the synchronisation error. Design choices of this implementation: subnormal
// inputs and results are flushed to zero, an exact cancellation gives +0,
// overflow gives infinity and a NaN or (inf - inf) gives the quiet NaN
// 0x7FC00000.
//
// Interface: a, b operands, sub selects subtraction; y result. No clock.
module fp32_add
  import ikeda_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);

  logic        sa, sb, sbig, ssml;
  logic [7:0]  ea, eb, ebig, esml, dexp;
  logic [22:0] fa, fb;
  logic        a_zero, b_zero;
  logic [26:0] mbig, msml, msml_sh;   // 1.23 significand followed by 3 extra bits
  logic [27:0] sum;
  logic [4:0]  lz;
  logic        found;
  logic signed [9:0] exp_n;
  logic [26:0] norm;
  logic        guard, sticky, round_up;
  logic [23:0] mant_r;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    sb = sb ^ sub;
    a_zero = (ea == 8'h00);
    b_zero = (eb == 8'h00);

    // order by magnitude
    if ({ea, fa} >= {eb, fb}) begin
      sbig = sa; ebig = ea; mbig = {1'b1, fa, 3'b000};
      ssml = sb; esml = eb; msml = {1'b1, fb, 3'b000};
    end else begin
      sbig = sb; ebig = eb; mbig = {1'b1, fb, 3'b000};
      ssml = sa; esml = ea; msml = {1'b1, fa, 3'b000};
    end
    dexp = ebig - esml;

    // align the smaller operand, folding shifted-out bits into the sticky bit
    if (dexp >= 8'd27)
      msml_sh = 27'd1;
    else begin
      msml_sh = msml >> dexp;
      if ((msml & ((27'd1 << dexp) - 27'd1)) != '0) msml_sh[0] = 1'b1;
    end

    if (sbig == ssml) sum = {1'b0, mbig} + {1'b0, msml_sh};
    else              sum = {1'b0, mbig} - {1'b0, msml_sh};

    // normalise
    exp_n = 10'(ebig);
    norm  = '0;
    lz    = '0;
    found = 1'b0;
    if (sum[27]) begin
      norm  = sum[27:1];
      norm[0] = sum[1] | sum[0];
      exp_n = exp_n + 10'sd1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (!found && sum[i]) begin
          found = 1'b1;
          lz    = 5'(26 - i);
        end
      end
      norm  = sum[26:0] << lz;
      exp_n = exp_n - 10'(lz);
    end

    guard    = norm[2];
    sticky   = norm[1] | norm[0];
    round_up = guard & (sticky | norm[3]);
    mant_r   = {1'b0, norm[25:3]} + 24'(round_up);
    if (mant_r[23]) exp_n = exp_n + 10'sd1;

    if ((ea == 8'hFF && fa != '0) || (eb == 8'hFF && fb != '0))
      y = 32'h7FC0_0000;
    else if (ea == 8'hFF && eb == 8'hFF)
      y = (sa == sb) ? {sa, 8'hFF, 23'd0} : 32'h7FC0_0000;
    else if (ea == 8'hFF)
      y = {sa, 8'hFF, 23'd0};
    else if (eb == 8'hFF)
      y = {sb, 8'hFF, 23'd0};
    else if (a_zero && b_zero)
      y = {sa & sb, 31'd0};
    else if (a_zero)
      y = {sb, eb, fb};
    else if (b_zero)
      y = {sa, ea, fa};
    else if (sum == '0)
      y = 32'd0;
    else if (exp_n >= 10'sd255)
      y = {sbig, 8'hFF, 23'd0};
    else if (exp_n <= 10'sd0)
      y = {sbig, 31'd0};
    else
      y = {sbig, exp_n[7:0], mant_r[22:0]};
  end

endmodule
