// tb_counter_250ms: checks the 250 ms gate at its full length.
//
// Scenarios: a single pulse opens the gate for exactly 250000 cycles; pulses
// inside the gate change nothing; a sensor still high when the gate closes
// does not reopen it; the next rising edge does. A cycle-by-cycle reference
// (remaining-cycles counter) is compared with counter_out throughout.
module tb_counter_250ms;
  localparam int L = 250000;

  logic clk = 1'b0, rst_n = 1'b0, sensor_in = 1'b0;
  logic counter_out;
  int   checks = 0, failures = 0;
  int   remaining = 0;         // reference: cycles the gate has still to stay open
  logic prev_s = 1'b1;
  int   open_len = 0, max_len = 0, gates = 0;

  counter_250ms dut (.clk, .rst_n, .sensor_in, .counter_out);

  always #500 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model and comparison, evaluated on each rising edge.
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (counter_out !== (remaining > 0)) begin
      failures++;
      if (failures < 10) $display("%0t: counter_out=%b expected %b", $time, counter_out, remaining > 0);
    end
    if (counter_out) open_len++;
    else if (open_len != 0) begin
      gates++;
      if (open_len > max_len) max_len = open_len;
      checks++;
      if (open_len != L) begin failures++; $display("gate length %0d", open_len); end
      open_len = 0;
    end
    if (remaining > 0) remaining--;
    else if (sensor_in && !prev_s) remaining = L;
    prev_s = sensor_in;
  end

  task automatic pulse(int high, int low);
    sensor_in = 1'b1; repeat (high) @(negedge clk);
    sensor_in = 1'b0; repeat (low) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    checks++;
    if (counter_out !== 1'b0) begin failures++; $display("gate open without a pulse"); end
    pulse(100, 1000);                       // opens the gate
    repeat (20) pulse(1000, 6500);          // ignored inside the gate
    @(negedge clk);
    wait (!counter_out);
    repeat (100) @(negedge clk);
    // sensor high across a new gate's end
    pulse(50, 100);
    repeat (L - 300) @(negedge clk);
    sensor_in = 1'b1;
    repeat (400) @(negedge clk);            // gate closes while sensor high
    checks++;
    if (counter_out !== 1'b0) begin failures++; $display("gate reopened without an edge"); end
    sensor_in = 1'b0;
    repeat (10) @(negedge clk);
    pulse(10, 10);                          // next edge reopens it
    checks++;
    if (counter_out !== 1'b1) begin failures++; $display("gate did not reopen"); end
    repeat (L + 10) @(negedge clk);
    checks++;
    if (gates != 3) begin failures++; $display("gates seen: %0d", gates); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
