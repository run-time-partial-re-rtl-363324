// reconfig_initiator: stands in for the processor's arbiter in the board
// test design. A press of the "module 1" or "module 2" push button (rising
// edge of the debounced level) requests a re-configuration with bitstream 1
// or bitstream 2: for one clock it raises start_op and set, with mc_address
// set to BS1_ADDR or BS2_ADDR. It then waits for end_op; presses while it
// waits are ignored, and `busy` shows the wait. If both buttons rise in the
// same clock, module 1 wins.
// The buttons forcing a re-configuration with bitstream 1 or 2 are the test
// design's; the storage addresses, the waiting for end_op and the one-clock
// request are this design's choice. Synchronous active-high reset.
module reconfig_initiator #(
  parameter int unsigned      ADDR_W   = 24,
  parameter logic [ADDR_W-1:0] BS1_ADDR = '0,
  parameter logic [ADDR_W-1:0] BS2_ADDR = ADDR_W'(32'h2000)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              btn_rm1,
  input  logic              btn_rm2,
  output logic              start_op,
  output logic              set,
  output logic [ADDR_W-1:0] mc_address,
  input  logic              end_op,
  output logic              busy
);
  logic rm1_q, rm2_q, rise1, rise2;

  assign rise1 = btn_rm1 && !rm1_q;
  assign rise2 = btn_rm2 && !rm2_q;
  assign set   = start_op;

  always_ff @(posedge clk) begin
    if (rst) begin
      rm1_q        <= 1'b0;
      rm2_q        <= 1'b0;
      start_op     <= 1'b0;
      mc_address   <= '0;
      busy         <= 1'b0;
    end else begin
      rm1_q    <= btn_rm1;
      rm2_q    <= btn_rm2;
      start_op <= 1'b0;
      if (busy) begin
        if (end_op) busy <= 1'b0;
      end else if (rise1 || rise2) begin
        start_op   <= 1'b1;
        busy       <= 1'b1;
        mc_address <= rise1 ? BS1_ADDR : BS2_ADDR;
      end
    end
  end
endmodule
