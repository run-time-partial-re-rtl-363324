// hs_reg: handshaking register, one stage of the valid/acknowledge data bus
// that links the repositories to the re-configuration unit.
//
// A D flip-flop with an enable holds the data word; a little handshaking logic
// drives the enable. The register loads whenever it is empty or its word is
// being acknowledged downstream in the same cycle, so a burst moves one stage
// per clock and the chain sustains one word per cycle. A word appears at the
// output, with valid_next set, one clock after it was offered and accepted;
// valid_next drops one clock after the last acknowledge when nothing follows.
//
// Interface: valid_prev/ack_prev/data_in face the predecessor, valid_next/
// ack_next/data_out the successor. ack_prev is combinational from ack_next.
// Reset (active high, synchronous) empties the register. Reset polarity and
// synchronous style are this design's choice.
module hs_reg #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         valid_prev,
  output logic         ack_prev,
  input  logic [W-1:0] data_in,
  output logic         valid_next,
  input  logic         ack_next,
  output logic [W-1:0] data_out
);

  logic enable;

  assign enable   = !valid_next || ack_next;
  assign ack_prev = enable;

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_next <= 1'b0;
      data_out   <= '0;
    end else if (enable) begin
      valid_next <= valid_prev;
      if (valid_prev) data_out <= data_in;
    end
  end

endmodule
