// tb_counter_30khz: checks the 1 MHz -> 30 kHz divider.
//
// After reset the divider's phase is known, so the expected output in every
// cycle follows from the cycle number n alone: with DIV = 33, counter_out is
// high when n mod 33 >= 17 and tick is high when n mod 33 == 17. The bench also
// checks the rate: 100 ticks in 3300 cycles (30.3 kHz at 1 MHz) and 121 ticks
// in a 4 ms (4000-cycle) window.
module tb_counter_30khz;
  localparam int DIV = 33;
  localparam int LOW = 17;

  logic clk = 1'b0, rst_n = 1'b0;
  logic counter_out, tick;
  int   checks = 0, failures = 0;

  counter_30khz dut (.clk, .rst_n, .counter_out, .tick);

  always #500 clk = ~clk;   // 1 MHz

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, ticks, ticks4ms, high_cycles;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    ticks = 0; ticks4ms = 0; high_cycles = 0;
    for (n = 0; n < 3300; n++) begin
      // Values seen before posedge n+1 are those after n posedges.
      checks++;
      if (counter_out !== ((n % DIV) >= LOW) || tick !== ((n % DIV) == LOW)) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: counter_out=%b tick=%b", n, counter_out, tick);
      end
      ticks += tick;
      if (n < 4000) ticks4ms += tick;
      high_cycles += counter_out;
      @(negedge clk);
    end
    checks++;
    if (ticks != 100) begin failures++; $display("ticks in 3300 cycles: %0d", ticks); end
    checks++;
    if (high_cycles != 1600) begin failures++; $display("high cycles: %0d", high_cycles); end
    // 4 ms window starting at an arbitrary phase
    ticks4ms = 0;
    for (n = 0; n < 4000; n++) begin
      ticks4ms += tick;
      @(negedge clk);
    end
    checks++;
    if (ticks4ms < 121 || ticks4ms > 122) begin
      failures++; $display("ticks in 4 ms: %0d", ticks4ms);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
