// clk_blink: divides a clock down to a visible square wave for a front-panel
// LED. The output toggles every HALF_PERIOD input cycles, so its frequency is
// f_clk / (2 * HALF_PERIOD). Used for the 4 Hz (DDU clock), 2 Hz (PC clock)
// and 1 Hz (ODMB clock) LEDs; each instance runs in the clock it watches, so
// a dead clock shows as a LED that stops blinking.
module clk_blink #(
  parameter int unsigned HALF_PERIOD = 20_000_000
) (
  input  logic clk,
  input  logic rst,
  output logic led
);
  logic [$clog2(HALF_PERIOD+1)-1:0] cnt;
  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; led <= 1'b0;
    end else if (cnt == $bits(cnt)'(HALF_PERIOD - 1)) begin
      cnt <= '0; led <= ~led;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
