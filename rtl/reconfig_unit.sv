// reconfig_unit: the sink of the handshaking chain. It turns the 32-bit
// bitstream words it receives into ICAP-wide sub-words and writes them to the
// ICAP under control of the main controller.
//
// Two parts, in series: a width adapter (WORD_W to ICAP_W, most significant
// sub-word first) and the re-configuration controller, which acknowledges one
// sub-word per clock while the ICAP is not busy and counts them against the
// bitstream length. The width adapter's sub-word counter is cleared by every
// accepted start so an aborted operation leaves nothing behind. For the
// Virtex-II Pro the ICAP is 8 bits wide; a 32-bit ICAP (Virtex-4) only needs
// ICAP_W = 32. Timing: with data waiting, one ICAP write per clock;
// end_op is a one-cycle pulse one clock after the last write.
module reconfig_unit
#(
  parameter int unsigned WORD_W       = 32,
  parameter int unsigned ICAP_W       = 8,
  parameter int unsigned LEN_W        = 64,
  parameter int unsigned STATUS_BYTES = 4
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      start,
  input  logic                      abort_req,
  output logic                      end_op,
  output logic                      aborted,
  output prmu_pkg::mc_state_e                 state,
  input  logic [LEN_W-1:0]          length,
  input  logic                      length_valid,
  input  logic                      valid,
  output logic                      ack,
  input  logic [WORD_W-1:0]         data,
  output logic                      icap_ce_n,
  output logic                      icap_write_n,
  output logic [ICAP_W-1:0]         icap_i,
  input  logic                      icap_busy,
  input  logic [ICAP_W-1:0]         icap_o,
  output logic [STATUS_BYTES*8-1:0] status,
  output logic                      status_valid
);

  logic              sub_valid, sub_ack;
  logic [ICAP_W-1:0] sub_data;

  width_adapter #(.IN_W(WORD_W), .OUT_W(ICAP_W)) u_width (
    .clk, .rst,
    .clear      (start && state == prmu_pkg::MC_IDLE),
    .valid_prev (valid),
    .ack_prev   (ack),
    .data_in    (data),
    .valid_next (sub_valid),
    .ack_next   (sub_ack),
    .data_out   (sub_data)
  );

  reconfig_controller #(
    .SUB_W(ICAP_W), .WORD_W(WORD_W), .LEN_W(LEN_W), .STATUS_BYTES(STATUS_BYTES)
  ) u_ctrl (
    .clk, .rst,
    .start, .abort_req, .end_op, .aborted, .state,
    .length, .length_valid,
    .valid        (sub_valid),
    .ack          (sub_ack),
    .data         (sub_data),
    .icap_ce_n, .icap_write_n, .icap_i, .icap_busy, .icap_o,
    .status, .status_valid
  );

endmodule
