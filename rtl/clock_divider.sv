// clock_divider: derives the Euler step rate from the board clock.
//
// The 50 MHz board clock is divided by DIV (64 by default, which with
// dt = 1/1024 gives about 762 Euler steps per unit of model time per second).
// Instead of a second clock domain the divider produces tick, a one-cycle
// enable every DIV board clocks, which clocks the delay line and the state
// register as clock enables; clk_div is the same rate as a square wave (high
// for the first half of each period) for observation or for an external
// converter. The divide ratio is the document's; using an enable rather than
// a derived clock is this design's choice.
//
// Interface: clk, synchronous active-high rst; tick, clk_div.
// Timing: the first tick comes DIV cycles after reset is released, then one
// every DIV cycles.
module clock_divider #(
  parameter int unsigned DIV = 64
) (
  input  logic clk,
  input  logic rst,
  output logic tick,
  output logic clk_div
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= (cnt == CW'(DIV - 1));
      cnt  <= (cnt == CW'(DIV - 1)) ? '0 : cnt + CW'(1);
    end
  end

  assign clk_div = (cnt < CW'(DIV / 2));

  initial assert (DIV >= 2) else $error("DIV must be at least 2");

endmodule
