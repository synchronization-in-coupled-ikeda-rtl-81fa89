// coupling_unit: the time-dependent coupling factor k(t) between drive and
// response.
//
// Three modes, selected at run time:
//   COUPLE_NONE   k = 0, the systems run free;
//   COUPLE_SQUARE a square wave k1, k2, k1, k2, ... whose level changes every
//                 tau, i.e. every N Euler steps, starting with k1 (defaults
//                 k1 = 0, k2 = 50);
//   COUPLE_COS    k = -alpha + 2*mu*|cos(y(t - tau))|, from the cosine of the
//                 response's delayed state.
// The square wave is a step counter that counts committed Euler steps
// (step_done) and flips the level after N of them, like the counter-driven
// multiplexer of the blockset realization. The cosine form is |cos| (sign bit
// cleared) times 2*mu, less alpha, in single precision. The formulas and
// levels are the document's; counting committed steps is this design's
// choice.
//
// Interface: mode, step_done (pulse at each committed Euler step), cos_yd;
// k (binary32, combinational from mode, the square-wave phase and cos_yd).
module coupling_unit
  import ikeda_pkg::*;
#(
  parameter fp32_t       MU    = FP_MU_SYNC,
  parameter fp32_t       ALPHA = FP_ALPHA_SYNC,
  parameter fp32_t       K1    = FP_ZERO,
  parameter fp32_t       K2    = FP_K2,
  parameter int unsigned N     = 1024
) (
  input  logic         clk,
  input  logic         rst,
  input  couple_mode_e mode,
  input  logic         step_done,
  input  fp32_t        cos_yd,
  output fp32_t        k,
  output logic         phase
);

  localparam int unsigned CW = $clog2(N + 1);
  // 2*mu: one more in the exponent field (mu is a normal number)
  localparam fp32_t TWO_MU = MU + 32'h0080_0000;

  logic [CW-1:0] cnt;
  fp32_t         abs_cos, two_mu_cos, k_cos;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      phase <= 1'b0;
    end else if (step_done) begin
      if (cnt == CW'(N - 1)) begin
        cnt   <= '0;
        phase <= ~phase;
      end else begin
        cnt <= cnt + CW'(1);
      end
    end
  end

  assign abs_cos = {1'b0, cos_yd[30:0]};
  fp32_mul u_mul (.a(TWO_MU), .b(abs_cos), .y(two_mu_cos));
  fp32_add u_sub (.a(two_mu_cos), .b(ALPHA), .sub(1'b1), .y(k_cos));

  always_comb begin
    unique case (mode)
      COUPLE_SQUARE: k = phase ? K2 : K1;
      COUPLE_COS:    k = k_cos;
      default:       k = FP_ZERO;
    endcase
  end

endmodule
