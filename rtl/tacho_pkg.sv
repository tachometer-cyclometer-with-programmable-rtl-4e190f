// tacho_pkg: constants and types shared by the tachometer blocks.
//
// The tachometer runs from a 1 MHz clock. The timing constants below are in
// cycles of that clock: 4 ms = 4000 cycles, 250 ms = 250000 cycles. The 30 kHz
// counting clock is the 1 MHz clock divided by 33 (30.3 kHz), which puts 121
// counting pulses into one 4 ms window. With a four-stroke engine giving one
// ignition pulse per two revolutions (rpm = 30 x pulse frequency), a 250 ms gate
// sees rpm/120 pulses, each worth 121 counts, so the count equals the speed in
// rpm to within about one percent with no multiplier or divider.
//
// The display table splits the count into ranges: below 700, then 200-wide
// ranges 700..900, 900..1100, ..., 5900..6100, then 6100 and above. The range
// limits and step come from the design; the 56-bit code layout (28-LED bar plus
// four 7-segment digits) is this implementation's own choice.
package tacho_pkg;

  // Default timing, in 1 MHz clock cycles.
  localparam int unsigned CLK_HZ        = 1_000_000;
  localparam int unsigned DEF_DIV_30K       = 33;             // 1 MHz / 33 = 30.3 kHz
  localparam int unsigned DEF_SHORT_CYCLES  = CLK_HZ / 250;   // 4 ms
  localparam int unsigned DEF_LONG_CYCLES   = CLK_HZ / 4;     // 250 ms

  // Measurement and display widths.
  localparam int unsigned CNT_W         = 14;
  localparam int unsigned LED_W         = 56;
  localparam int unsigned BAR_LEDS      = 28;             // bits 27:0 of the LED bus

  // Display ranges: thresholds RANGE_MIN + RANGE_STEP*i, i = 0 .. NUM_THRESH-1.
  localparam int unsigned RANGE_MIN     = 700;
  localparam int unsigned RANGE_STEP    = 200;
  localparam int unsigned NUM_THRESH    = 28;             // 700 .. 6100
  localparam int unsigned NUM_RANGES    = NUM_THRESH + 1; // 29 table rows

  typedef logic [CNT_W-1:0] count_t;
  typedef logic [LED_W-1:0] led_code_t;

  // States of the Management controller. The four named states are the
  // design's own; PAUSE holds the counter while only the long window is open.
  typedef enum logic [2:0] {
    NACHALO = 3'd0,   // "start": counter held in reset until the long window opens
    COUNT   = 3'd1,   // both windows open: counter enabled
    PAUSE   = 3'd2,   // long window open, short window closed: counter holds
    ZAPIS_A = 3'd3,   // "write", first cycle: register enabled
    ZAPIS_B = 3'd4    // "write", second cycle: register enabled
  } mgmt_state_t;

  // 7-segment pattern, bit 6 = segment a ... bit 0 = segment g, active high.
  function automatic logic [6:0] seg7(input int unsigned digit);
    case (digit)
      0: return 7'b1111110;
      1: return 7'b0110000;
      2: return 7'b1101101;
      3: return 7'b1111001;
      4: return 7'b0110011;
      5: return 7'b1011011;
      6: return 7'b1011111;
      7: return 7'b1110000;
      8: return 7'b1111111;
      9: return 7'b1111011;
      default: return 7'b0000000;
    endcase
  endfunction

  // LED code of display range k (0 .. NUM_RANGES-1): k bar LEDs lit, and the
  // digits showing the range centre 600 + 200*k with a leading zero blanked.
  function automatic led_code_t range_code(input int unsigned k);
    led_code_t    code;
    int unsigned  centre;
    centre = RANGE_MIN - RANGE_STEP / 2 + RANGE_STEP * k;
    code   = '0;
    for (int unsigned i = 0; i < BAR_LEDS; i++)
      code[i] = (i < k);
    code[55:49] = (centre >= 1000) ? seg7(centre / 1000) : 7'b0000000;
    code[48:42] = seg7((centre / 100) % 10);
    code[41:35] = seg7((centre / 10) % 10);
    code[34:28] = seg7(centre % 10);
    return code;
  endfunction

endpackage
