// stimuli_gen: stimuli generator of the board test design. It holds the
// 4-bit vector applied to the re-configurable module and steps to the next
// vector on each press of the "next vector" push button (rising edge of the
// debounced level), so that all 16 rows of the combinational module's truth
// table are reached in order 0000, 0001, ..., 1111 and then again from 0000.
// That a push button makes the generator produce the next vector is the test
// design's; the counting order and the edge detection are this design's
// choice. Synchronous active-high reset to 0000; stimuli changes one clock
// after the rising edge is sampled.
module stimuli_gen (
  input  logic       clk,
  input  logic       rst,
  input  logic       next_vector,
  output logic [3:0] stimuli
);
  logic next_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      next_q  <= 1'b0;
      stimuli <= '0;
    end else begin
      next_q <= next_vector;
      if (next_vector && !next_q) stimuli <= stimuli + 1'b1;
    end
  end
endmodule
