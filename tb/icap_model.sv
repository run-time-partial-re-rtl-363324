// icap_model: behavioural model of the Virtex-II Pro internal configuration
// access port (ICAP), for simulation only; the real port is a hard block of
// the FPGA.
//
// Write: a data word on `i` is taken at a rising clock edge when ce_n and
// write_n are low and busy is low. The model undoes the per-byte bit swap and
// stores the word in `mem`, counting accepted words in `nwords`.
// Busy: with BUSY_PCT (or the variable busy_pct) above 0 the model raises busy at random (that percentage of
// clocks, for one clock at a time), standing for a full input buffer.
// Abort: write_n rising while ce_n stays low counts as an abort (`naborts`).
// While ce_n is low and write_n high, `o` shows the bytes of STATUS, most
// significant first, advancing one byte per clock in which busy is low.
module icap_model #(
  parameter int unsigned W        = 8,
  parameter int unsigned DEPTH    = 65536,
  parameter int unsigned BUSY_PCT = 0,
  parameter logic [31:0] STATUS   = 32'h5A_C3_0F_96
) (
  input  logic         clk,
  input  logic         ce_n,
  input  logic         write_n,
  input  logic [W-1:0] i,
  output logic         busy,
  output logic [W-1:0] o
);

  logic [W-1:0] mem [DEPTH];
  int unsigned  nwords  = 0;
  int unsigned  naborts = 0;
  int unsigned  nbusy   = 0;
  int unsigned  busy_pct = BUSY_PCT;   // may be changed by a testbench
  logic         prev_ce_n = 1'b1, prev_write_n = 1'b1;
  int unsigned  sidx = 0;
  logic         reading;

  function automatic logic [W-1:0] unswap(input logic [W-1:0] d);
    logic [W-1:0] r;
    for (int k = 0; k < W; k++) r[(k / 8) * 8 + 7 - (k % 8)] = d[k];
    return r;
  endfunction

  assign reading = !ce_n && write_n;
  assign o       = W'(STATUS[31 - 8*(sidx % 4) -: 8]);

  initial busy = 1'b0;

  always @(posedge clk) begin
    if (!ce_n && !write_n && !busy) begin
      if (nwords < DEPTH) mem[nwords] <= unswap(i);
      nwords <= nwords + 1;
    end
    // abort: read/write pin switched to read while enabled after a write
    if (reading && !prev_ce_n && !prev_write_n) naborts <= naborts + 1;
    // status read-back: one byte per clock while reading and not busy
    if (!reading)   sidx <= 0;
    else if (!busy) sidx <= sidx + 1;
    prev_ce_n    <= ce_n;
    prev_write_n <= write_n;
    // busy generation (never while reading back)
    if (busy_pct > 0 && !reading && ($urandom % 100) < busy_pct) begin
      busy  <= 1'b1;
      nbusy <= nbusy + 1;
    end else begin
      busy <= 1'b0;
    end
  end

endmodule
