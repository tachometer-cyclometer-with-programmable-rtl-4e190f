// tb_management: checks the measurement controller.
//
// First a directed run of one measurement: the long and short windows (a1, a2)
// open together, the short one closes and reopens, then both close. The
// expected state and outputs, cycle by cycle, are written out by hand from the
// state table. Then a random run of a1/a2 levels is compared with a reference
// next-state function written independently in this bench.
module tb_management;
  import tacho_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, a1 = 1'b0, a2 = 1'b0;
  logic count_ena, reg_ena, count_rst;
  mgmt_state_t state;
  int   checks = 0, failures = 0;

  management dut (.clk, .rst_n, .a1, .a2, .count_ena, .reg_ena, .count_rst, .state);

  always #500 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expect: state code and outputs {count_ena, reg_ena, count_rst}
  task automatic expect_state(mgmt_state_t s, logic [2:0] outs, string what);
    checks++;
    if (state !== s || {count_ena, reg_ena, count_rst} !== outs) begin
      failures++;
      $display("%s: state=%0d outs=%b, expected state=%0d outs=%b",
               what, state, {count_ena, reg_ena, count_rst}, s, outs);
    end
  endtask

  function automatic int ref_next(int s, logic l, logic sh);
    // 0 start, 1 count, 2 pause, 3 write a, 4 write b
    if (s == 0) return l ? (sh ? 1 : 2) : 0;
    if (s == 1 || s == 2) return !l ? 3 : (sh ? 1 : 2);
    if (s == 3) return 4;
    return 0;
  endfunction

  function automatic logic [2:0] ref_outs(int s);
    return {s == 1, s == 3 || s == 4, s == 0};
  endfunction

  initial begin
    int s;
    repeat (2) @(negedge clk);
    expect_state(NACHALO, 3'b001, "in reset");
    rst_n = 1'b1;
    @(negedge clk);
    expect_state(NACHALO, 3'b001, "idle");
    a1 = 1'b1; a2 = 1'b1;
    @(negedge clk);
    expect_state(COUNT, 3'b100, "both windows open");
    @(negedge clk);
    expect_state(COUNT, 3'b100, "still counting");
    a2 = 1'b0;
    @(negedge clk);
    expect_state(PAUSE, 3'b000, "short window closed");
    @(negedge clk);
    expect_state(PAUSE, 3'b000, "waiting for pulse");
    a2 = 1'b1;
    @(negedge clk);
    expect_state(COUNT, 3'b100, "short window reopened");
    a1 = 1'b0; a2 = 1'b0;
    @(negedge clk);
    expect_state(ZAPIS_A, 3'b010, "long window closed");
    @(negedge clk);
    expect_state(ZAPIS_B, 3'b010, "second write cycle");
    @(negedge clk);
    expect_state(NACHALO, 3'b001, "counter reset");
    @(negedge clk);
    expect_state(NACHALO, 3'b001, "reset held until next gate");
    a1 = 1'b1; a2 = 1'b0;
    @(negedge clk);
    expect_state(PAUSE, 3'b000, "gate open, short closed");
    a1 = 1'b0;
    @(negedge clk);
    expect_state(ZAPIS_A, 3'b010, "gate closed from pause");

    // random run against the reference
    s = 3;
    for (int n = 0; n < 5000; n++) begin
      if ($urandom_range(7) == 0) a1 = ~a1;
      if ($urandom_range(3) == 0) a2 = ~a2;
      s = ref_next(s, a1, a2);
      @(negedge clk);
      checks++;
      if (int'(state) != s || {count_ena, reg_ena, count_rst} !== ref_outs(s)) begin
        failures++;
        if (failures < 10) $display("random step %0d: state=%0d expected %0d", n, state, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
