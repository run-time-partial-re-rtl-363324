// led_mux: result/stimuli multiplexer in front of the board's four LEDs.
// The DIP switch chooses what the LEDs show: result of the re-configurable
// module when show_result is 1, the stimuli vector when it is 0. The board
// has only four LEDs, so both 4-bit values share them.
// The multiplexer and its select by a DIP switch are the test design's; the
// polarity of the select and the registered output (one clock of latency,
// keeping the LED pins glitch-free) are this design's choice.
module led_mux #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         show_result,
  input  logic [W-1:0] stimuli,
  input  logic [W-1:0] result,
  output logic [W-1:0] leds
);
  always_ff @(posedge clk) begin
    if (rst)              leds <= '0;
    else if (show_result) leds <= result;
    else                  leds <= stimuli;
  end
endmodule
