// delay_line: the tapped shift register that supplies x(t - N).
//
// Functionally a DEPTH-stage shift register clocked by the Euler step enable,
// with the output taken at stage `tap` (N = tau/dt, 1024 for tau = 1 and
// dt = 1/1024 in a 2048-stage register). It is built as a circular buffer in
// a DEPTH x WIDTH memory (block RAM) with a write pointer, which behaves the
// same as the shift register: on each shift the word written `tap` shifts
// earlier is read out and din is written. Until `tap` words have been written
// since reset the output is init_val instead, which realises the constant
// initial history x(t <= 0) = x0 without clearing the memory. A run-time tap
// lets the same block serve a different or a varying delay.
//
// Interface: shift (one-cycle enable), din, tap (1 .. DEPTH), init_val;
// dout (registered).
// Timing: dout is updated on the clock edge of the shift and holds the word
// written `tap` shifts before it (or init_val).
module delay_line #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 2048
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       shift,
  input  logic [WIDTH-1:0]           din,
  input  logic [$clog2(DEPTH):0]     tap,
  input  logic [WIDTH-1:0]           init_val,
  output logic [WIDTH-1:0]           dout
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr;
  logic [AW:0]      filled;     // words written since reset, saturating at DEPTH
  logic [AW-1:0]    rd_ptr;
  logic [WIDTH-1:0] rd_word;

  assign rd_ptr = wr_ptr - tap[AW-1:0];

  // memory port: read-before-write, no reset (contents are masked by filled)
  always_ff @(posedge clk) begin
    if (shift) begin
      rd_word     <= mem[rd_ptr];
      mem[wr_ptr] <= din;
    end
  end

  logic use_init;

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr   <= '0;
      filled   <= '0;
      use_init <= 1'b1;
    end else if (shift) begin
      wr_ptr   <= wr_ptr + AW'(1);
      if (filled != (AW+1)'(DEPTH)) filled <= filled + (AW+1)'(1);
      use_init <= (filled < tap);
    end
  end

  assign dout = use_init ? init_val : rd_word;

  initial assert (DEPTH >= 2 && (1 << AW) == DEPTH) else $error("DEPTH must be a power of two");

  property p_tap_range;
    @(posedge clk) disable iff (rst) shift |-> (tap >= 1 && tap <= (AW+1)'(DEPTH));
  endproperty
  a_tap_range: assert property (p_tap_range);

endmodule
