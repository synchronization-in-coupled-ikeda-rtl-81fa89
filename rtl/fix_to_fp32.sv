// fix_to_fp32: combinational conversion of a signed 5.27 fixed-point number
// to IEEE 754 single precision.
//
// The magnitude is normalised with a leading-one search and rounded to
// nearest, ties to even (a 32-bit magnitude can carry more bits than the 24 of
// a single-precision significand). It brings the sine and cosine produced by
// the fixed-point CORDIC back onto the floating-point bus. Exact zero maps to
// +0.
//
// Interface: q (5.27), y (binary32). No clock.
module fix_to_fp32
  import ikeda_pkg::*;
(
  input  q5_27_t q,
  output fp32_t  y
);

  logic        s;
  logic [31:0] mag, norm;
  logic [4:0]  msb;
  logic        guard, sticky, round_up;
  logic [23:0] mant_r;
  logic [7:0]  e;

  always_comb begin
    s   = q[31];
    mag = s ? (~q + 32'd1) : q;          // -2^31 gives 2^31, still representable
    msb = '0;
    for (int i = 0; i < 32; i++)
      if (mag[i]) msb = 5'(i);
    norm     = mag << (5'd31 - msb);     // leading one now at bit 31
    guard    = norm[7];
    sticky   = |norm[6:0];
    round_up = guard & (sticky | norm[8]);
    mant_r   = {1'b0, norm[30:8]} + 24'(round_up);
    // value = mag * 2^-27, so the unbiased exponent is msb - 27
    e        = 8'(msb) + 8'd100 + 8'(mant_r[23]);
    y        = (mag == '0) ? 32'd0 : {s, e, mant_r[22:0]};
  end

endmodule
