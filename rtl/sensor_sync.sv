// sensor_sync: two-flop synchronizer for the asynchronous ignition-coil signal.
//
// The coil pulses are not related to the 1 MHz clock, so they pass two
// flip-flops before the window counters look for rising edges. This adds two
// clock cycles (2 us) of delay, which is negligible against the 4 ms and 250 ms
// windows. The synchronizer is this implementation's addition; the design
// feeds the sensor straight to its two window counters.
//
// Interface: clk, active-low asynchronous rst_n, async_in, sync_out.
module sensor_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic async_in,
  output logic sync_out
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta     <= 1'b0;
      sync_out <= 1'b0;
    end else begin
      meta     <= async_in;
      sync_out <= meta;
    end
  end
endmodule
