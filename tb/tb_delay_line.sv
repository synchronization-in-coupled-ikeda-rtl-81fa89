// tb_delay_line: self-checking test of the tapped delay line.
//
// A reference record of every word written is kept alongside the block. Each
// shift writes a random word; after the shift the block's output must equal
// the word written `tap` shifts earlier, or init_val while fewer than `tap`
// words have been written since reset. The default 2048-stage size is used
// with the document's tap of 1024, then other taps including 1 and 2048, and
// a second reset checks that the initial history comes back. Shifts are
// spaced irregularly to show that only shift advances the line.
module tb_delay_line;
  localparam int WIDTH = 32, DEPTH = 2048;

  logic clk = 0, rst = 1, shift = 0;
  logic [WIDTH-1:0] din, init_val, dout;
  logic [$clog2(DEPTH):0] tap;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] hist [0:9999];  // every word written since reset, in order
  int nwr;                          // words written since reset

  delay_line #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_shift();
    logic [WIDTH-1:0] expv;
    int ti;
    din = $urandom;
    ti = int'(tap);
    expv = (nwr >= ti) ? hist[nwr - ti] : init_val;
    @(negedge clk) shift = 1;
    @(negedge clk) shift = 0;
    hist[nwr] = din;
    nwr++;
    checks++;
    if (dout !== expv) begin
      failures++;
      if (failures < 10) $display("FAIL tap %0d: dout %h expected %h", tap, dout, expv);
    end
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  task automatic do_reset();
    @(negedge clk) rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    nwr = 0;
  endtask

  initial begin
    init_val = 32'h3DCC_CCCD;
    tap = 1024;
    din = '0;
    do_reset();
    repeat (3000) do_shift();
    tap = 1;    repeat (20) do_shift();
    tap = 2048; repeat (100) do_shift();
    tap = 477;  repeat (100) do_shift();
    do_reset();
    init_val = 32'h1234_5678;
    tap = 5;    repeat (20) do_shift();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
