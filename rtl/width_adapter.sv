// width_adapter: puts a wide handshake word on its output one sub-word at a
// time, most significant sub-word first.
//
// A counter selects, through a multiplexer, which sub-word of data_in drives
// data_out. The counter advances when the current sub-word is offered and
// acknowledged (valid_prev and ack_next). On the acknowledge of the last
// sub-word the adapter acknowledges the whole input word to its predecessor
// and the counter wraps, so a new word is split at full rate: one sub-word per
// clock while the successor keeps acknowledging. valid_next is valid_prev.
//
// clear (synchronous) returns the counter to the first sub-word; the
// repository selection uses it when a new operation starts. The sub-word order
// (most significant first) matches the byte order of the bitstream words; it
// is this design's choice, as is the clear input.
module width_adapter #(
  parameter int unsigned IN_W  = 32,
  parameter int unsigned OUT_W = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             valid_prev,
  output logic             ack_prev,
  input  logic [IN_W-1:0]  data_in,
  output logic             valid_next,
  input  logic             ack_next,
  output logic [OUT_W-1:0] data_out
);

  localparam int unsigned N   = IN_W / OUT_W;
  localparam int unsigned CW  = (N > 1) ? $clog2(N) : 1;

  logic [CW-1:0] cnt;
  logic          step;
  logic          last;

  assign step       = valid_prev && ack_next;
  assign last       = (cnt == CW'(N - 1));
  assign ack_prev   = step && last;
  assign valid_next = valid_prev;

  // sub-word multiplexer, selected by the counter (sub-word 0 = most significant)
  always_comb begin
    data_out = data_in[IN_W-1 -: OUT_W];
    for (int i = 0; i < N; i++)
      if (cnt == CW'(i)) data_out = data_in[(N - 1 - i) * OUT_W +: OUT_W];
  end

  always_ff @(posedge clk) begin
    if (rst || clear)  cnt <= '0;
    else if (step)     cnt <= last ? '0 : cnt + 1'b1;
  end

  initial begin
    assert (IN_W % OUT_W == 0) else $error("width_adapter: IN_W must be a multiple of OUT_W");
  end

endmodule
