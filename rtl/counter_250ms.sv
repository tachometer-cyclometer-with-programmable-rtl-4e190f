// counter_250ms: the long measuring gate.
//
// On a rising edge of the (synchronized) sensor signal the window opens and
// counter_out goes high. It stays high for exactly LONG_CYCLES clock cycles
// (250 ms at 1 MHz) whatever the sensor does meanwhile, then goes low, and the
// block waits for the next rising edge to open a new window. This behaviour is
// the design's. Rising edges are found by comparing the input with its value
// one cycle earlier; after reset a sensor that is already high does not count
// as an edge. counter_out rises one cycle after the edge is seen.
//
// Interface: clk, active-low asynchronous rst_n, sensor_in (synchronous to clk),
// counter_out (1 while the window is open).
module counter_250ms #(
  parameter int unsigned LONG_CYCLES = tacho_pkg::DEF_LONG_CYCLES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sensor_in,
  output logic counter_out
);
  localparam int unsigned W = $clog2(LONG_CYCLES);

  logic [W-1:0] tmp;
  logic         prev;
  logic         rise;

  assign rise = sensor_in & ~prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev        <= 1'b1;
      tmp         <= '0;
      counter_out <= 1'b0;
    end else begin
      prev <= sensor_in;
      if (counter_out) begin
        if (tmp == W'(LONG_CYCLES - 1)) begin
          counter_out <= 1'b0;
          tmp         <= '0;
        end else begin
          tmp <= tmp + 1'b1;
        end
      end else if (rise) begin
        counter_out <= 1'b1;
        tmp         <= '0;
      end
    end
  end
endmodule
