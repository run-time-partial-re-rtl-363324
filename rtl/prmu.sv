// prmu: Partial Re-configuration Management Unit. On request of the
// processor's arbiter it reads a partial bitstream from one of two
// repositories and writes it into the FPGA's internal configuration access
// port (ICAP), at one ICAP word per clock.
//
// Structure: two repository interfaces (on-chip block RAM, off-chip memory
// on the processor local bus behind a FIFO) feed a repository selector, whose
// handshaking output runs through CHAIN_STAGES handshaking registers (the
// place where a bitstream processor would be inserted) to the
// re-configuration unit, which drives the ICAP.
// Arbiter interface: start_op together with set requests a re-configuration
// of the bitstream at mc_address; it is taken only while the unit is idle.
// Bit ADDR_W-1 of mc_address selects the repository (0 on-chip, 1 off-chip),
// the bits below it are the start address inside that repository (32-bit
// words on chip, bus words off chip). end_op pulses for one clock when the
// bitstream has been written or an abort has finished (then `aborted` is
// high until the next start). abort_req cancels a running re-configuration; the
// ICAP status read during the abort appears on status.
// Latency from start_op to the first ICAP write is a few clocks (about five
// with the on-chip repository and one chain stage); then one write per clock
// while the ICAP is not busy and data is available.
module prmu
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
  input  logic                            clk,
  input  logic                            rst,
  // arbiter
  input  logic                            start_op,
  input  logic                            set,
  input  logic [ADDR_W-1:0]               mc_address,
  output logic                            end_op,
  input  logic                            abort_req,
  output logic                            aborted,
  output logic [STATUS_BYTES*8-1:0]       status,
  output logic                            status_valid,
  // on-chip repository memory
  output logic                            bram_en,
  output logic [BRAM_AW-1:0]              bram_addr,
  input  logic [WORD_W-1:0]               bram_dout,
  // off-chip repository FIFO
  output logic                            fifo_clear,
  output logic                            fifo_wr_en,
  output logic [BUS_W-1:0]                fifo_wdata,
  output logic                            fifo_rd_en,
  input  logic [BUS_W-1:0]                fifo_rdata,
  input  logic                            fifo_empty,
  input  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count,
  // bus master port
  output logic                            m_req,
  output logic [ADDR_W-1:0]               m_addr,
  output logic [$clog2(BURST+1)-1:0]      m_len,
  input  logic                            m_gnt,
  input  logic [BUS_W-1:0]                m_rdata,
  input  logic                            m_rvalid,
  // ICAP
  output logic                            icap_ce_n,
  output logic                            icap_write_n,
  output logic [ICAP_W-1:0]               icap_i,
  input  logic                            icap_busy,
  input  logic [ICAP_W-1:0]               icap_o
);

  localparam int unsigned NREP = 2;

  prmu_pkg::mc_state_e         state;
  logic              start;
  logic [NREP-1:0]   rep_select, rep_valid, rep_ack, rep_length_valid;
  logic [WORD_W-1:0] rep_data   [NREP];
  logic [LEN_W-1:0]  rep_length [NREP];
  logic [ADDR_W-1:0] rep_addr;

  logic              sel_valid, sel_ack, length_valid;
  logic [WORD_W-1:0] sel_data;
  logic [LEN_W-1:0]  length;

  assign start    = start_op && set && (state == prmu_pkg::MC_IDLE);
  assign rep_addr = {1'b0, mc_address[ADDR_W-2:0]};

  onchip_repo_if #(.AW(BRAM_AW), .ADDR_W(ADDR_W), .W(WORD_W), .LEN_W(LEN_W)) u_onchip (
    .clk, .rst,
    .repository_select (rep_select[0]),
    .start_address     (rep_addr),
    .bs_length         (rep_length[0]),
    .bs_length_valid   (rep_length_valid[0]),
    .valid             (rep_valid[0]),
    .ack               (rep_ack[0]),
    .data_out          (rep_data[0]),
    .bram_en, .bram_addr, .bram_dout
  );

  offchip_repo_if #(
    .ADDR_W(ADDR_W), .BUS_W(BUS_W), .W(WORD_W), .LEN_W(LEN_W),
    .BURST(BURST), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_offchip (
    .clk, .rst,
    .repository_select (rep_select[1]),
    .start_address     (rep_addr),
    .bs_length         (rep_length[1]),
    .bs_length_valid   (rep_length_valid[1]),
    .valid             (rep_valid[1]),
    .ack               (rep_ack[1]),
    .data_out          (rep_data[1]),
    .m_req, .m_addr, .m_len, .m_gnt, .m_rdata, .m_rvalid,
    .fifo_clear, .fifo_wr_en, .fifo_wdata, .fifo_rd_en, .fifo_rdata, .fifo_empty, .fifo_count
  );

  repository_selector #(.NREP(NREP), .ADDR_W(ADDR_W), .W(WORD_W), .LEN_W(LEN_W)) u_sel (
    .clk, .rst,
    .start            (start),
    .address          (mc_address),
    .rep_select, .rep_valid, .rep_ack, .rep_data, .rep_length, .rep_length_valid,
    .valid            (sel_valid),
    .ack              (sel_ack),
    .data             (sel_data),
    .length           (length),
    .length_valid     (length_valid)
  );

  // handshaking chain between selector and re-configuration unit
  logic              ch_valid [CHAIN_STAGES+1];
  logic              ch_ack   [CHAIN_STAGES+1];
  logic [WORD_W-1:0] ch_data  [CHAIN_STAGES+1];

  assign ch_valid[0] = sel_valid;
  assign ch_data[0]  = sel_data;
  assign sel_ack     = ch_ack[0];

  for (genvar s = 0; s < CHAIN_STAGES; s++) begin : g_chain
    hs_reg #(.W(WORD_W)) u_stage (
      .clk,
      .rst        (rst || start),
      .valid_prev (ch_valid[s]),
      .ack_prev   (ch_ack[s]),
      .data_in    (ch_data[s]),
      .valid_next (ch_valid[s+1]),
      .ack_next   (ch_ack[s+1]),
      .data_out   (ch_data[s+1])
    );
  end

  reconfig_unit #(
    .WORD_W(WORD_W), .ICAP_W(ICAP_W), .LEN_W(LEN_W), .STATUS_BYTES(STATUS_BYTES)
  ) u_reconf (
    .clk, .rst,
    .start, .abort_req, .end_op, .aborted, .state,
    .length, .length_valid,
    .valid        (ch_valid[CHAIN_STAGES]),
    .ack          (ch_ack[CHAIN_STAGES]),
    .data         (ch_data[CHAIN_STAGES]),
    .icap_ce_n, .icap_write_n, .icap_i, .icap_busy, .icap_o,
    .status, .status_valid
  );

endmodule
