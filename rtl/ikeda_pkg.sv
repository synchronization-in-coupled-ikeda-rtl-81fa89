// ikeda_pkg: shared types and constants of the Ikeda delay-system emulator.
//
// All arithmetic state is carried as IEEE 754 single-precision words (fp32_t),
// the 32-bit internal bus of the analog-output realization. The fixed-point
// helpers use the 5.27 format (signed, 5 integer bits including sign, 27
// fraction bits) that also feeds the DAC. The constants below are the
// single-precision encodings of the numbers used by the design; the angle
// constants are in the same 5.27 format.
package ikeda_pkg;

  typedef logic [31:0] fp32_t;          // IEEE 754 binary32 bit pattern
  typedef logic signed [31:0] q5_27_t;  // signed fixed point, 27 fraction bits

  // Single-precision encodings
  localparam fp32_t FP_ZERO     = 32'h0000_0000;
  localparam fp32_t FP_ONE      = 32'h3F80_0000;  // 1.0
  localparam fp32_t FP_TWO      = 32'h4000_0000;  // 2.0
  localparam fp32_t FP_0P1      = 32'h3DCC_CCCD;  // 0.1 (initial history)
  localparam fp32_t FP_DT_1024  = 32'h3A80_0000;  // 1/1024 (Euler step)
  localparam fp32_t FP_MU_SYNC  = 32'h41A0_0000;  // 20.0 (mu, synchronization runs)
  localparam fp32_t FP_ALPHA_SYNC = 32'h40A0_0000; // 5.0 (alpha, synchronization runs)
  localparam fp32_t FP_MU_SOLO  = 32'h40C0_0000;  // 6.0 (mu, single-system run)
  localparam fp32_t FP_K2       = 32'h4248_0000;  // 50.0 (square-wave coupling high level)

  // Angles in 5.27 fixed point
  localparam q5_27_t Q_PI      = 32'sd421657428;  // round(pi    * 2^27)
  localparam q5_27_t Q_HALF_PI = 32'sd210828714;  // round(pi/2  * 2^27)
  localparam q5_27_t Q_TWO_PI  = 32'sd843314857;  // round(2*pi  * 2^27)

  // Coupling selection
  typedef enum logic [1:0] {
    COUPLE_NONE   = 2'd0,  // k(t) = 0: the two systems run free
    COUPLE_SQUARE = 2'd1,  // k(t) alternates k1, k2 every tau (Eq. 6)
    COUPLE_COS    = 2'd2   // k(t) = -alpha + 2 mu |cos(y(t - tau))| (Eq. 7)
  } couple_mode_e;

  typedef enum logic {
    DIR_UNI = 1'b0,  // response follows drive (Eq. 4, 5)
    DIR_BI  = 1'b1   // mutual coupling (Eq. 8, 9)
  } couple_dir_e;

endpackage
