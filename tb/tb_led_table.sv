// tb_led_table: checks the display table for every 14-bit input value.
//
// The expected code is built here from arithmetic: range k = 0 below 700,
// 28 at 6100 and above, else (value - 700) / 200 + 1; k bar LEDs lit in bits
// 27:0; the centre 600 + 200k in four 7-segment digits in bits 55:28, with the
// thousands digit blank below 1000. Some rows are also checked against
// constants written out by hand (e.g. 5200 shows "5200" and 23 bar LEDs).
module tb_led_table;
  logic [13:0] value;
  logic [55:0] led;
  int          checks = 0, failures = 0;
  logic [6:0]  seg [10] = '{7'h7E, 7'h30, 7'h6D, 7'h79, 7'h33, 7'h5B, 7'h5F, 7'h70, 7'h7F, 7'h7B};

  led_table dut (.value, .led);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [55:0] expected(int v);
    int k, c;
    logic [55:0] e;
    k = (v < 700) ? 0 : (v >= 6100) ? 28 : (v - 700) / 200 + 1;
    c = 600 + 200 * k;
    e = '0;
    e[27:0]  = 28'((64'd1 << k) - 1);
    e[55:49] = (c >= 1000) ? seg[c / 1000] : 7'd0;
    e[48:42] = seg[(c / 100) % 10];
    e[41:35] = seg[(c / 10) % 10];
    e[34:28] = seg[c % 10];
    return e;
  endfunction

  task automatic check_const(int v, logic [55:0] e);
    value = 14'(v);
    #10;
    checks++;
    if (led !== e) begin failures++; $display("value %0d: led=%h expected %h", v, led, e); end
  endtask

  initial begin
    for (int v = 0; v < 16384; v++) begin
      value = 14'(v);
      #10;
      checks++;
      if (led !== expected(v)) begin
        failures++;
        if (failures < 10) $display("value %0d: led=%h expected %h", v, led, expected(v));
      end
    end
    // "5200": 5,2,0,0 and 23 bar LEDs
    check_const(5200, {7'h5B, 7'h6D, 7'h7E, 7'h7E, 28'h07F_FFFF});
    // below 700: " 600", no bar LEDs
    check_const(0,    {7'h00, 7'h5F, 7'h7E, 7'h7E, 28'h0});
    check_const(699,  {7'h00, 7'h5F, 7'h7E, 7'h7E, 28'h0});
    // first range "800", one bar LED
    check_const(700,  {7'h00, 7'h7F, 7'h7E, 7'h7E, 28'h1});
    // 6100 and above: "6200", all 28 bar LEDs
    check_const(6100, {7'h5F, 7'h6D, 7'h7E, 7'h7E, 28'hFFF_FFFF});
    check_const(16383,{7'h5F, 7'h6D, 7'h7E, 7'h7E, 28'hFFF_FFFF});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
