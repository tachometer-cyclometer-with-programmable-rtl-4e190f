// counter_4ms: the short counting window opened by every ignition pulse.
//
// On each rising edge of the (synchronized) sensor signal counter_out goes high
// and the 12-bit counter tmp restarts at 1; tmp then advances once per clock.
// When tmp has reached SHORT_CYCLES (4000, i.e. 4 ms at 1 MHz) the window
// closes: counter_out goes low and tmp returns to 0. The window is therefore
// high for exactly SHORT_CYCLES cycles, starting one cycle after the edge is
// seen. A rising edge that arrives while the window is open restarts it, so
// every pulse gets a full 4 ms; the design says that every pulse starts a new
// 4 ms period, and at the highest displayed speeds the pulse spacing (5 ms at
// 6000 rpm) is longer than the window anyway. After reset a sensor that is
// already high does not count as an edge.
//
// Interface: clk, active-low asynchronous rst_n, sensor_in (synchronous to clk),
// counter_out (1 while the window is open).
module counter_4ms #(
  parameter int unsigned SHORT_CYCLES = tacho_pkg::DEF_SHORT_CYCLES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sensor_in,
  output logic counter_out
);
  localparam int unsigned W = (SHORT_CYCLES >= 4096) ? $clog2(SHORT_CYCLES + 1) : 12;

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
      if (rise) begin
        counter_out <= 1'b1;
        tmp         <= W'(1);
      end else if (counter_out) begin
        if (tmp == W'(SHORT_CYCLES)) begin
          counter_out <= 1'b0;
          tmp         <= '0;
        end else begin
          tmp <= tmp + 1'b1;
        end
      end
    end
  end
endmodule
