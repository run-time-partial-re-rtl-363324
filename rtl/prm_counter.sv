// prm_counter: the sequential re-configurable test module, a 4-bit up
// counter with count enable. Each press of the count-enable push button
// (a rising edge of the debounced count_en level) advances the count by one,
// wrapping from 15 to 0; result shows the count.
// The 4-bit counter with a count enable driven by a push button is the test
// design's; advancing once per press (edge detection) rather than on every
// clock while the button is held is this design's choice, so that single
// steps are visible on the LEDs at a 50 MHz clock. Synchronous active-high
// reset to 0. result changes one clock after the rising edge of count_en
// is sampled.
module prm_counter (
  input  logic       clk,
  input  logic       rst,
  input  logic       count_en,
  output logic [3:0] result
);
  logic en_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      en_q   <= 1'b0;
      result <= '0;
    end else begin
      en_q <= count_en;
      if (count_en && !en_q) result <= result + 1'b1;
    end
  end
endmodule
