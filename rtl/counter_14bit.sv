// counter_14bit: counts 30 kHz pulses while Management enables it.
//
// On each clock edge: if rst is high the count returns to 0; otherwise, if ena
// and tick (the one-cycle 30 kHz pulse) are both high, the count advances by
// one. The count wraps at 2^W; with a 250 ms gate the count is about the engine
// speed in rpm, so 14 bits cover up to 16383 rpm. The enable and reset come
// from Management as in the design; using the 30 kHz pulse as a clock enable
// on the main clock, the priority of rst over ena and the wrap are this
// implementation's choices.
//
// Interface: clk, active-low asynchronous rst_n, rst, ena, tick, counter_out.
module counter_14bit #(
  parameter int unsigned W = tacho_pkg::CNT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rst,
  input  logic         ena,
  input  logic         tick,
  output logic [W-1:0] counter_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           counter_out <= '0;
    else if (rst)         counter_out <= '0;
    else if (ena && tick) counter_out <= counter_out + 1'b1;
  end
endmodule
