// tachometer: engine-speed meter for a four-stroke engine, top level.
//
// Every ignition pulse on sensor_in opens a 4 ms window; the first pulse after
// an idle period also opens a 250 ms gate. While both are open, a 14-bit
// counter counts pulses of a 30 kHz clock derived from the 1 MHz main clock,
// so each ignition pulse in the gate adds about 121 counts. The gate sees
// rpm/120 pulses, so the total is about the speed in rpm: the speed is found
// without multiplying or dividing. When the gate closes, Management copies the
// count into a register, clears the counter and waits for the next gate; the
// register drives a table that gives the 56-bit LED code.
//
// Blocks and connections follow the design's functional scheme: Counter 30 kHz,
// Counter 250 ms, Counter 4 ms, Management, 14 bit Counter, 14 bit Register,
// Table. A two-flop synchronizer on sensor_in and the single-clock style (the
// 30 kHz signal is a clock enable) are this implementation's additions.
//
// Interface: clk (1 MHz), rst_n (active low, asynchronous), sensor_in (coil
// pulses, asynchronous), led (56-bit segment code), reg_out (last measurement).
// Timing: a measurement is ready 3 cycles after its gate closes (two register
// write cycles); the gate opens 3 cycles after the sensor edge (synchronizer
// plus edge detect). Parameters give the timing in clock cycles.
module tachometer
  import tacho_pkg::*;
#(
  parameter int unsigned DIV_30K      = tacho_pkg::DEF_DIV_30K,
  parameter int unsigned SHORT_CYCLES = tacho_pkg::DEF_SHORT_CYCLES,
  parameter int unsigned LONG_CYCLES  = tacho_pkg::DEF_LONG_CYCLES
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      sensor_in,
  output led_code_t led,
  output count_t    reg_out
);
  logic        sensor_s;
  logic        tick30;
  logic        counter250ms_out, counter4ms_out;
  logic        counter_ena, register_ena, counter_reset;
  count_t      counter14bit_out;

  sensor_sync u_sync (
    .clk, .rst_n, .async_in(sensor_in), .sync_out(sensor_s)
  );

  counter_30khz #(.DIV(DIV_30K)) u_counter30khz (
    .clk, .rst_n, .counter_out(), .tick(tick30)
  );

  counter_250ms #(.LONG_CYCLES(LONG_CYCLES)) u_counter250ms (
    .clk, .rst_n, .sensor_in(sensor_s), .counter_out(counter250ms_out)
  );

  counter_4ms #(.SHORT_CYCLES(SHORT_CYCLES)) u_counter4ms (
    .clk, .rst_n, .sensor_in(sensor_s), .counter_out(counter4ms_out)
  );

  management u_management (
    .clk, .rst_n,
    .a1(counter250ms_out), .a2(counter4ms_out),
    .count_ena(counter_ena), .reg_ena(register_ena), .count_rst(counter_reset),
    .state()
  );

  counter_14bit #(.W(CNT_W)) u_counter14bit (
    .clk, .rst_n, .rst(counter_reset), .ena(counter_ena), .tick(tick30),
    .counter_out(counter14bit_out)
  );

  register_14bit #(.W(CNT_W)) u_register (
    .clk, .rst_n, .ena(register_ena), .d(counter14bit_out), .q(reg_out)
  );

  led_table u_table (
    .value(reg_out), .led
  );
endmodule
