// tb_clock_divider: self-checking test of the Euler-rate clock divider.
//
// After reset, tick must be high for exactly one cycle in every DIV cycles,
// the first DIV cycles after reset is released, and clk_div must be high for
// DIV/2 cycles of every period. Run with the default DIV = 64 and checked
// over 50 periods.
module tb_clock_divider;
  localparam int DIV = 64;

  logic clk = 0, rst = 1;
  logic tick, clk_div;
  int checks = 0, failures = 0;
  int cyc, last_tick, ticks, high_cnt;

  clock_divider #(.DIV(DIV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;     // released before posedge 0
    cyc = 0; last_tick = 0; ticks = 0; high_cnt = 0;
    while (ticks < 50) begin
      @(posedge clk);
      cyc++;
      #1;
      if (clk_div) high_cnt++;
      if (tick) begin
        checks++;
        if (cyc - last_tick != DIV) begin
          failures++;
          $display("FAIL tick after %0d cycles, expected %0d", cyc - last_tick, DIV);
        end
        checks++;
        if (high_cnt != DIV / 2) begin
          failures++;
          $display("FAIL clk_div high for %0d cycles", high_cnt);
        end
        high_cnt = 0;
        last_tick = cyc;
        ticks++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
