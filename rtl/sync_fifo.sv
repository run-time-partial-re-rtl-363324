// sync_fifo: synchronous first-word-fall-through FIFO, the buffer between the
// processor local bus and the off-chip repository interface.
//
// A circular array with a write pointer and a read pointer, one bit wider
// than the address so that equal addresses can be told apart as empty or
// full. rdata always shows the oldest word while empty is low; rd_en removes
// it at the clock edge. wr_en stores wdata at the clock edge. count is the
// number of words held. clear empties the FIFO synchronously. Writing when
// full or reading when empty is an error, checked by assertions.
// DEPTH defaults to two 16-word bursts, as the document specifies; the
// first-word-fall-through style and the clear input are this design's choice.
module sync_fifo #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 32
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       clear,
  input  logic                       wr_en,
  input  logic [W-1:0]               wdata,
  output logic                       full,
  input  logic                       rd_en,
  output logic [W-1:0]               rdata,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wptr, rptr;
  logic [AW:0]  used;

  assign used  = wptr - rptr;
  assign count = ($clog2(DEPTH+1))'(used);
  assign empty = (used == '0);
  assign full  = (used == (AW+1)'(DEPTH));
  assign rdata = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (wr_en && !full) wptr <= wptr + 1'b1;
      if (rd_en && !empty) rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wptr[AW-1:0]] <= wdata;
  end

  initial begin
    assert (DEPTH == 2**AW) else $error("sync_fifo: DEPTH must be a power of two");
  end

  property no_overflow;
    @(posedge clk) disable iff (rst || clear) !(wr_en && full);
  endproperty
  property no_underflow;
    @(posedge clk) disable iff (rst || clear) !(rd_en && empty);
  endproperty
  assert property (no_overflow)  else $error("sync_fifo: write while full");
  assert property (no_underflow) else $error("sync_fifo: read while empty");

endmodule
