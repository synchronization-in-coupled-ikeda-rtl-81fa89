// fp32_to_fix: combinational conversion of an IEEE 754 single-precision
// number to signed 5.27 fixed point.
//
// The significand is shifted by (exponent - 123) places: 1.f * 2^(e-127) in
// units of 2^-27. Fraction bits that fall off are truncated toward zero, and
// a magnitude of 16 or more saturates to the most positive or negative 5.27
// value. Zero, subnormals and values below 2^-27 give 0. A NaN saturates
// like a large number of its sign. The document gives the 5.27 format for
// the DAC path; truncation and saturation are this design's choices.
//
// Interface: a (binary32), q (5.27). No clock.
module fp32_to_fix
  import ikeda_pkg::*;
(
  input  fp32_t  a,
  output q5_27_t q
);

  logic        s;
  logic [7:0]  e;
  logic [23:0] m;
  logic [31:0] mag;
  logic        sat;

  always_comb begin
    s   = a[31];
    e   = a[30:23];
    m   = {1'b1, a[22:0]};
    sat = 1'b0;
    mag = '0;
    if (e == 8'h00)
      mag = '0;
    else if (e >= 8'd131)                 // |a| >= 16
      sat = 1'b1;
    else if (e >= 8'd123)
      mag = 32'(m) << (e - 8'd123);       // at most 2^31 - 2^7
    else if (e > 8'd99)
      mag = 32'(m) >> (8'd123 - e);
    else
      mag = '0;

    if (sat) q = s ? 32'sh8000_0000 : 32'sh7FFF_FFFF;
    else     q = s ? -$signed(mag) : $signed(mag);
  end

endmodule
