// register_14bit: holds the last completed measurement.
//
// q loads d on every clock edge on which ena is high and keeps its value
// otherwise; reset clears it to 0. Management raises ena for two cycles after
// the 250 ms window closes, while the counter is stopped, so the register
// always holds the count of the last complete window and the display does not
// flicker while the next one is being counted. Function from the design; the
// reset value is this implementation's choice.
//
// Interface: clk, active-low asynchronous rst_n, ena, d, q.
module register_14bit #(
  parameter int unsigned W = tacho_pkg::CNT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ena,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (ena) q <= d;
  end
endmodule
