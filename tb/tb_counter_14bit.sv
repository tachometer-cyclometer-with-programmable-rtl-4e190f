// tb_counter_14bit: checks the pulse counter.
//
// Directed: counting from 0 with ena and tick, holding when either is low, the
// synchronous rst winning over ena, and the wrap from 16383 to 0. Then random
// rst/ena/tick compared with a reference count kept in the bench.
module tb_counter_14bit;
  logic        clk = 1'b0, rst_n = 1'b0, rst = 1'b0, ena = 1'b0, tick = 1'b0;
  logic [13:0] counter_out;
  int          checks = 0, failures = 0;
  int          ref_cnt = 0;

  counter_14bit dut (.clk, .rst_n, .rst, .ena, .tick, .counter_out);

  always #500 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic r, logic e, logic t);
    rst = r; ena = e; tick = t;
    @(negedge clk);
    if (r) ref_cnt = 0;
    else if (e && t) ref_cnt = (ref_cnt + 1) % 16384;
    checks++;
    if (counter_out !== 14'(ref_cnt)) begin
      failures++;
      if (failures < 10) $display("r=%b e=%b t=%b: count %0d expected %0d", r, e, t, counter_out, ref_cnt);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    step(0, 1, 1); step(0, 1, 1); step(0, 1, 0); step(0, 0, 1); step(0, 1, 1);
    checks++;
    if (counter_out !== 14'd3) begin failures++; $display("directed count %0d", counter_out); end
    step(1, 1, 1);
    checks++;
    if (counter_out !== 14'd0) begin failures++; $display("rst did not clear"); end
    for (int i = 0; i < 16384; i++) step(0, 1, 1);   // full wrap back to 0
    checks++;
    if (counter_out !== 14'd0) begin failures++; $display("no wrap: %0d", counter_out); end
    for (int i = 0; i < 5000; i++)
      step($urandom_range(99) == 0, $urandom_range(3) != 0, $urandom_range(1) == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
