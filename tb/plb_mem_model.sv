// plb_mem_model: behavioural model of the off-chip bitstream memory as seen
// through the processor local bus, for simulation only (the bus, its IP
// interface and the DDR memory are vendor parts outside the design).
//
// A request (m_req high with m_addr and m_len) is answered with a one-cycle
// m_gnt after 0 to MAX_GNT_DELAY idle clocks; the transfer is taken at the
// clock edge where m_req and m_gnt are both high. The model then returns m_len
// words from mem[m_addr], mem[m_addr+1], ..., one per m_rvalid pulse; with
// GAP_PCT > 0 it leaves random idle clocks between beats, standing for
// other traffic on the shared bus. The testbench fills `mem` directly.
module plb_mem_model #(
  parameter int unsigned AW            = 16,
  parameter int unsigned W             = 64,
  parameter int unsigned LW            = 5,
  parameter int unsigned MAX_GNT_DELAY = 3,
  parameter int unsigned GAP_PCT       = 0
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          m_req,
  input  logic [23:0]   m_addr,
  input  logic [LW-1:0] m_len,
  output logic          m_gnt,
  output logic [W-1:0]  m_rdata,
  output logic          m_rvalid
);

  logic [W-1:0] mem [2**AW];
  int unsigned  delay, left, nreq = 0, nburst = 0;
  logic [AW-1:0] ptr;
  logic          active;
  int unsigned   gap_pct = GAP_PCT;   // may be changed by a testbench

  always @(posedge clk) begin
    m_gnt    <= 1'b0;
    m_rvalid <= 1'b0;
    if (rst) begin
      active <= 1'b0;
      delay  <= 0;
    end else if (m_gnt && m_req) begin
      // the transfer is taken at the edge where request and grant meet
      active <= 1'b1;
      ptr    <= m_addr[AW-1:0];
      left   <= 32'(m_len);
      nreq   <= nreq + 1;
      if (m_len > 1) nburst <= nburst + 1;
    end else if (active) begin
      if (left > 0 && (gap_pct == 0 || ($urandom % 100) >= gap_pct)) begin
        m_rvalid <= 1'b1;
        m_rdata  <= mem[ptr];
        ptr      <= ptr + 1'b1;
        left     <= left - 1;
        if (left == 1) active <= 1'b0;
      end
    end else if (m_req && !m_gnt) begin
      if (delay == 0) begin
        m_gnt <= 1'b1;
        delay <= $urandom % (MAX_GNT_DELAY + 1);
      end else begin
        delay <= delay - 1;
      end
    end
  end

endmodule
