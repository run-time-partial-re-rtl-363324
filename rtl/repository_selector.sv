// repository_selector: connects one of NREP bitstream repositories to the
// re-configuration unit.
//
// On a start request the upper SEL_W bits of the bitstream address pick the
// repository; the choice is registered and holds until the next start. In
// the start cycle the chosen repository's repository_select line is pulsed
// so that it begins its initialisation at start_address (every repository
// sees the whole address and uses the bits below the select field). From
// then on the selector is a multiplexer: valid, data, length and
// length_valid of the chosen repository go to the output and the acknowledge
// goes back to it alone. An address whose select field names no repository
// selects nothing and the outputs stay invalid.
// Selecting by the most significant address bits is this design's choice;
// the document says only that the selection follows the start address and
// is updated when a re-configuration starts.
// The address bits below the select field are not needed here (lint
// reports them unused); the repositories use them.
module repository_selector #(
  parameter int unsigned NREP   = 2,
  parameter int unsigned ADDR_W = 24,
  parameter int unsigned W      = 32,
  parameter int unsigned LEN_W  = 64
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic [ADDR_W-1:0]    address,
  // towards the repositories
  output logic [NREP-1:0]      rep_select,
  input  logic [NREP-1:0]      rep_valid,
  output logic [NREP-1:0]      rep_ack,
  input  logic [W-1:0]         rep_data      [NREP],
  input  logic [LEN_W-1:0]     rep_length    [NREP],
  input  logic [NREP-1:0]      rep_length_valid,
  // towards the re-configuration unit
  output logic                 valid,
  input  logic                 ack,
  output logic [W-1:0]         data,
  output logic [LEN_W-1:0]     length,
  output logic                 length_valid
);

  localparam int unsigned SEL_W = (NREP > 1) ? $clog2(NREP) : 1;

  logic [SEL_W-1:0] addr_idx, sel_idx;
  logic             addr_ok, sel_ok;

  assign addr_idx = (NREP > 1) ? address[ADDR_W-1 -: SEL_W] : '0;
  assign addr_ok  = (32'(addr_idx) < NREP);

  always_ff @(posedge clk) begin
    if (rst) begin
      sel_idx <= '0;
      sel_ok  <= 1'b0;
    end else if (start) begin
      sel_idx <= addr_idx;
      sel_ok  <= addr_ok;
    end
  end

  always_comb begin
    rep_select   = '0;
    rep_ack      = '0;
    valid        = 1'b0;
    data         = '0;
    length       = '0;
    length_valid = 1'b0;
    for (int r = 0; r < NREP; r++) begin
      if (start && addr_ok && addr_idx == SEL_W'(r)) rep_select[r] = 1'b1;
      if (sel_ok && sel_idx == SEL_W'(r)) begin
        valid        = rep_valid[r];
        data         = rep_data[r];
        length       = rep_length[r];
        length_valid = rep_length_valid[r];
        rep_ack[r]   = ack;
      end
    end
  end

endmodule
