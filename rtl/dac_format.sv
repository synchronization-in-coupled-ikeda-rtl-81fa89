// dac_format: prepares one DAC sample from a single-precision state value.
//
// The value is converted to signed 5.27 fixed point (truncated toward zero,
// saturating at +-16) and the upper 16 bits are kept, giving a signed
// 16-bit sample with 11 fraction bits (1 LSB = 2^-11) for the audio codec's
// 16-bit data input. The format and the bit selection are the document's.
//
// Interface: a (binary32); sample (16 bits, two's complement). No clock.
module dac_format
  import ikeda_pkg::*;
(
  input  fp32_t       a,
  output logic [15:0] sample
);

  q5_27_t q;

  fp32_to_fix u_fix (.a(a), .q(q));

  assign sample = q[31:16];

  logic unused_low;
  assign unused_low = ^q[15:0];

endmodule
