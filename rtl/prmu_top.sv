// prmu_top: the partial re-configuration management unit with the memories
// it works with: the block RAM of the on-chip repository and the FIFO that
// buffers the off-chip repository. The processor local bus with its memory
// and the ICAP lie outside and are reached through ports.
//
// Ports: the arbiter interface of the PRMU (start_op, set, mc_address,
// end_op, abort_req, aborted, status), a bus master port for the off-chip
// repository, the ICAP pins, and a load port for the block RAM.
// The load port writes one 32-bit word per clock (load_en, load_addr,
// load_data) into the on-chip repository; it stands for the initialisation
// of the block RAM with a memory image by the FPGA flow and must only be
// used while no re-configuration from the on-chip repository runs (it has
// priority over the PRMU's reads). Load port and its priority are this
// design's choice. Address map and timing are those of `prmu`.
// The FIFO's full flag is left unconnected: the off-chip interface starts a
// burst only when the fill level shows room for all of it, so it never writes
// a full FIFO.
module prmu_top
#(
  parameter int unsigned ADDR_W       = prmu_pkg::ADDR_W,
  parameter int unsigned WORD_W       = prmu_pkg::BS_WORD_W,
  parameter int unsigned ICAP_W       = prmu_pkg::ICAP_W,
  parameter int unsigned LEN_W        = prmu_pkg::LEN_W,
  parameter int unsigned BRAM_AW      = prmu_pkg::BRAM_AW,
  parameter int unsigned BUS_W        = prmu_pkg::BUS_W,
  parameter int unsigned BURST        = prmu_pkg::BURST_LEN,
  parameter int unsigned FIFO_DEPTH   = prmu_pkg::FIFO_DEPTH,
  parameter int unsigned CHAIN_STAGES = 1,
  parameter int unsigned STATUS_BYTES = prmu_pkg::STATUS_BYTES
) (
  input  logic                       clk,
  input  logic                       rst,
  // arbiter
  input  logic                       start_op,
  input  logic                       set,
  input  logic [ADDR_W-1:0]          mc_address,
  output logic                       end_op,
  input  logic                       abort_req,
  output logic                       aborted,
  output logic [STATUS_BYTES*8-1:0]  status,
  output logic                       status_valid,
  // on-chip repository load port
  input  logic                       load_en,
  input  logic [BRAM_AW-1:0]         load_addr,
  input  logic [WORD_W-1:0]          load_data,
  // bus master port (off-chip repository)
  output logic                       m_req,
  output logic [ADDR_W-1:0]          m_addr,
  output logic [$clog2(BURST+1)-1:0] m_len,
  input  logic                       m_gnt,
  input  logic [BUS_W-1:0]           m_rdata,
  input  logic                       m_rvalid,
  // ICAP
  output logic                       icap_ce_n,
  output logic                       icap_write_n,
  output logic [ICAP_W-1:0]          icap_i,
  input  logic                       icap_busy,
  input  logic [ICAP_W-1:0]          icap_o
);

  localparam int unsigned FCW = $clog2(FIFO_DEPTH + 1);

  logic               p_bram_en;
  logic [BRAM_AW-1:0] p_bram_addr;
  logic [WORD_W-1:0]  bram_dout;

  logic               fifo_clear, fifo_wr_en, fifo_rd_en, fifo_empty, fifo_full;
  logic [BUS_W-1:0]   fifo_wdata, fifo_rdata;
  logic [FCW-1:0]     fifo_count;

  prmu #(
    .ADDR_W(ADDR_W), .WORD_W(WORD_W), .ICAP_W(ICAP_W), .LEN_W(LEN_W),
    .BRAM_AW(BRAM_AW), .BUS_W(BUS_W), .BURST(BURST), .FIFO_DEPTH(FIFO_DEPTH),
    .CHAIN_STAGES(CHAIN_STAGES), .STATUS_BYTES(STATUS_BYTES)
  ) u_prmu (
    .clk, .rst,
    .start_op, .set, .mc_address, .end_op, .abort_req, .aborted, .status, .status_valid,
    .bram_en   (p_bram_en),
    .bram_addr (p_bram_addr),
    .bram_dout (bram_dout),
    .fifo_clear, .fifo_wr_en, .fifo_wdata, .fifo_rd_en, .fifo_rdata, .fifo_empty, .fifo_count,
    .m_req, .m_addr, .m_len, .m_gnt, .m_rdata, .m_rvalid,
    .icap_ce_n, .icap_write_n, .icap_i, .icap_busy, .icap_o
  );

  bram_sp #(.AW(BRAM_AW), .W(WORD_W)) u_bram (
    .clk,
    .en   (load_en || p_bram_en),
    .we   (load_en),
    .addr (load_en ? load_addr : p_bram_addr),
    .din  (load_data),
    .dout (bram_dout)
  );

  sync_fifo #(.W(BUS_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst,
    .clear (fifo_clear),
    .wr_en (fifo_wr_en),
    .wdata (fifo_wdata),
    .full  (fifo_full),
    .rd_en (fifo_rd_en),
    .rdata (fifo_rdata),
    .empty (fifo_empty),
    .count (fifo_count)
  );

endmodule
