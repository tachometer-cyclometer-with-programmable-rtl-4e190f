// tb_counter_4ms: checks the 4 ms window at its full length.
//
// Every rising edge of the sensor must give a window exactly 4000 cycles long,
// starting one cycle after the edge; an edge inside an open window restarts
// the 4000 cycles; a sensor held high gives only one window. A reference
// (remaining-cycles counter) is compared with counter_out every cycle.
module tb_counter_4ms;
  localparam int S = 4000;

  logic clk = 1'b0, rst_n = 1'b0, sensor_in = 1'b0;
  logic counter_out;
  int   checks = 0, failures = 0;
  int   remaining = 0;
  logic prev_s = 1'b1;
  int   open_len = 0, windows = 0, long_windows = 0;

  counter_4ms dut (.clk, .rst_n, .sensor_in, .counter_out);

  always #500 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (counter_out !== (remaining > 0)) begin
      failures++;
      if (failures < 10) $display("%0t: counter_out=%b expected %b", $time, counter_out, remaining > 0);
    end
    if (counter_out) open_len++;
    else if (open_len != 0) begin
      windows++;
      if (open_len > S) long_windows++;
      open_len = 0;
    end
    if (sensor_in && !prev_s) remaining = S;
    else if (remaining > 0) remaining--;
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
    repeat (5) pulse(1000, 6000);           // 4000 rpm: separate windows
    repeat (5) pulse(1000, 2000);           // 9000 rpm: windows restarted
    repeat (6000) @(negedge clk);
    pulse(20000, 6000);                     // long high level: one window
    repeat (3) pulse(1 + $urandom_range(300), 4100 + $urandom_range(8000));
    repeat (6000) @(negedge clk);
    checks++;
    if (windows != 10 || long_windows != 1) begin
      failures++; $display("windows=%0d long=%0d", windows, long_windows);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
