// bram_sp: single-port block RAM with an enable, as used for the on-chip
// bitstream repository.
//
// An array read asynchronously feeds a D flip-flop that loads only while
// `en` is high, so the word at `addr` appears on `dout` after the next rising
// clock edge (one-cycle access). A write (we with en) stores `din` at `addr`
// on the same edge; the read register then shows the old contents
// (read-first). The array is not reset. INIT_FILE, when not empty, names a
// hexadecimal image loaded at start-up, which stands for the initialisation
// file of the FPGA flow.
module bram_sp #(
  parameter int unsigned AW        = 14,
  parameter int unsigned W         = 32,
  parameter string       INIT_FILE = ""
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout
);

  logic [W-1:0] mem [2**AW];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (en) begin
      dout <= mem[addr];
      if (we) mem[addr] <= din;
    end
  end

endmodule
