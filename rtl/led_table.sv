// led_table: turns the measured count into the 56-bit LED drive code.
//
// The count is compared with the 28 thresholds 700, 900, ..., 6100; the number
// k of thresholds it reaches (0 .. 28) selects one of 29 table rows, so the
// rows are "below 700", "700 to 900", ..., "5900 to 6100" and "6100 and above".
// Only comparators are used, no divider. Row contents (see
// tacho_pkg::range_code) are:
//   bits 27:0   bar graph, the k lowest LEDs lit
//   bits 55:28  four 7-segment digits (55:49 thousands ... 34:28 units, each
//               segments a..g from high bit to low bit, active high) showing
//               the range centre 600 + 200*k, leading zero blanked
// The ranges and the 56-bit width are the design's; the code layout is this
// implementation's choice, since the design does not list the table contents.
// The rows are constants computed when the design is elaborated.
//
// Interface: value (the register contents), led. Purely combinational.
module led_table
  import tacho_pkg::*;
(
  input  count_t    value,
  output led_code_t led
);
  led_code_t                     codes [NUM_RANGES];
  logic [NUM_THRESH-1:0]         reached;
  logic [$clog2(NUM_RANGES)-1:0] k;

  for (genvar r = 0; r < NUM_RANGES; r++) begin : g_row
    assign codes[r] = range_code(r);
  end

  for (genvar t = 0; t < NUM_THRESH; t++) begin : g_cmp
    assign reached[t] = (value >= count_t'(RANGE_MIN + RANGE_STEP * t));
  end

  // The thresholds rise with t, so reached is a thermometer code; count its ones.
  always_comb begin
    k = '0;
    for (int t = 0; t < NUM_THRESH; t++)
      if (reached[t]) k = k + 1'b1;
  end

  assign led = codes[k];
endmodule
