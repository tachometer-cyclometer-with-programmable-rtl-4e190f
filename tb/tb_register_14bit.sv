// tb_register_14bit: checks the result register.
//
// After reset the register reads 0. With random data and a write enable that
// is high about one cycle in four, q must always equal the last value written.
module tb_register_14bit;
  logic        clk = 1'b0, rst_n = 1'b0, ena = 1'b0;
  logic [13:0] d = '0, q;
  logic [13:0] ref_q;
  int          checks = 0, failures = 0, writes = 0;

  register_14bit dut (.clk, .rst_n, .ena, .d, .q);

  always #500 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (q !== 14'd0) begin failures++; $display("reset value %0d", q); end
    rst_n = 1'b1;
    ref_q = '0;
    for (int i = 0; i < 5000; i++) begin
      ena = ($urandom_range(3) == 0);
      d   = 14'($urandom);
      @(negedge clk);
      if (ena) begin ref_q = d; writes++; end
      checks++;
      if (q !== ref_q) begin
        failures++;
        if (failures < 10) $display("step %0d: q=%0d expected %0d", i, q, ref_q);
      end
    end
    checks++;
    if (writes < 1000) begin failures++; $display("too few writes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
