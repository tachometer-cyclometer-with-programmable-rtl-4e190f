// counter_30khz: divides the 1 MHz main clock to the 30 kHz counting clock.
//
// A 6-bit counter tmp runs 0 .. DIV-1 and wraps. counter_out is low while
// tmp < DIV - DIV/2 and high for the remaining DIV/2 cycles, so with the default
// DIV = 33 it is a 30.3 kHz square wave, low 17 cycles and high 16. tick is a
// one-cycle pulse in the first high cycle of counter_out; the 14 bit counter
// uses it as a clock enable, so the whole design stays on one clock.
//
// The division to about 30 kHz and the 6-bit counter width are the design's;
// the ratio 33 (chosen because it gives 121 pulses per 4 ms), the duty cycle
// and the tick output are this implementation's choices.
//
// Timing: tick is high once every DIV cycles, DIV - DIV/2 cycles after reset
// release and every DIV cycles after that.
module counter_30khz #(
  parameter int unsigned DIV = tacho_pkg::DEF_DIV_30K
) (
  input  logic clk,
  input  logic rst_n,
  output logic counter_out,
  output logic tick
);
  localparam int unsigned W   = (DIV > 64) ? $clog2(DIV) : 6;
  localparam int unsigned LOW = DIV - DIV / 2;

  logic [W-1:0] tmp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    tmp <= '0;
    else if (tmp == W'(DIV - 1))   tmp <= '0;
    else                           tmp <= tmp + 1'b1;
  end

  assign counter_out = (tmp >= W'(LOW));
  assign tick        = (tmp == W'(LOW));
endmodule
