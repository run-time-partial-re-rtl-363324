// reconfig_controller: writes the bitstream, sub-word by sub-word, into the
// ICAP and ends the operation after the length read from the repository.
//
// A main controller (states Idle, Initialise, Normal Re-configuration, Abort)
// runs the unit. A start request moves it to Initialise, where it waits for
// length_valid and stores the bitstream length (in 32-bit words) in a
// register. In Normal Re-configuration a counter counts the sub-words written
// to the ICAP and is compared with the stored length times the number of
// sub-words per word; equality is End Of Bitstream, which ends the operation:
// the controller returns to Idle and pulses end_op for one cycle.
// A sub-word is written, and acknowledged upstream, in the same cycle when it
// is valid, the ICAP is not busy, the end has not been reached and the
// controller is in Normal Re-configuration; ICAP chip enable (active low) is
// the inverse of that acknowledge and the write pin is held at 0 (write). So
// the unit writes one sub-word per clock whenever data and ICAP allow.
// An abort request (abort_req) in Normal Re-configuration switches the ICAP multiplexer
// to the abort sequence generator; when it reports completion the controller
// goes to Idle. That end_op is also pulsed after an abort, with `aborted`
// set, is this design's choice, as are the synchronous active-high reset and
// the registered end_op.
// Each byte on icap_i is bit-swapped (bit 7 of the bitstream byte on pin 0),
// as the ICAP expects.
module reconfig_controller
#(
  parameter int unsigned SUB_W        = 8,    // ICAP data width
  parameter int unsigned WORD_W       = 32,   // bitstream word width
  parameter int unsigned LEN_W        = 64,
  parameter int unsigned STATUS_BYTES = 4
) (
  input  logic                      clk,
  input  logic                      rst,
  // control
  input  logic                      start,
  input  logic                      abort_req,
  output logic                      end_op,
  output logic                      aborted,
  output prmu_pkg::mc_state_e                 state,
  // length from the selected repository
  input  logic [LEN_W-1:0]          length,
  input  logic                      length_valid,
  // handshaking input (sub-words)
  input  logic                      valid,
  output logic                      ack,
  input  logic [SUB_W-1:0]          data,
  // ICAP
  output logic                      icap_ce_n,
  output logic                      icap_write_n,
  output logic [SUB_W-1:0]          icap_i,
  input  logic                      icap_busy,
  input  logic [SUB_W-1:0]          icap_o,
  output logic [STATUS_BYTES*8-1:0] status,
  output logic                      status_valid
);

  localparam int unsigned NSUB  = WORD_W / SUB_W;
  localparam int unsigned CNT_W = LEN_W + $clog2(NSUB) + 1;

  logic [LEN_W-1:0] len_reg;
  logic [CNT_W-1:0] count;
  logic [CNT_W-1:0] target;
  logic             reconfig_en;
  logic             eob;
  logic             ab_start, ab_done, ab_ce_n, ab_write_n;

  assign reconfig_en = (state == prmu_pkg::MC_NORMAL);
  assign target      = CNT_W'(len_reg) * CNT_W'(NSUB);
  assign eob         = (count == target);
  assign ack         = valid && !icap_busy && !eob && reconfig_en;
  assign ab_start    = (state == prmu_pkg::MC_NORMAL) && abort_req;

  // counter of sub-words written, held in reset outside Normal Re-configuration
  always_ff @(posedge clk) begin
    if (rst || !reconfig_en) count <= '0;
    else if (ack)            count <= count + 1'b1;
  end

  // main controller
  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= prmu_pkg::MC_IDLE;
      len_reg <= '0;
      end_op  <= 1'b0;
      aborted <= 1'b0;
    end else begin
      end_op <= 1'b0;
      unique case (state)
        prmu_pkg::MC_IDLE: if (start) begin
          state   <= prmu_pkg::MC_INIT;
          aborted <= 1'b0;
        end
        prmu_pkg::MC_INIT: if (length_valid) begin
          len_reg <= length;
          state   <= prmu_pkg::MC_NORMAL;
        end
        prmu_pkg::MC_NORMAL: begin
          if (abort_req)    state <= prmu_pkg::MC_ABORT;
          else if (eob) begin
            state  <= prmu_pkg::MC_IDLE;
            end_op <= 1'b1;
          end
        end
        prmu_pkg::MC_ABORT: if (ab_done) begin
          state   <= prmu_pkg::MC_IDLE;
          end_op  <= 1'b1;
          aborted <= 1'b1;
        end
        default: state <= prmu_pkg::MC_IDLE;
      endcase
    end
  end

  abort_seq_gen #(.ICAP_W(SUB_W), .STATUS_BYTES(STATUS_BYTES)) u_abort (
    .clk, .rst,
    .start        (ab_start),
    .done         (ab_done),
    .ce_n         (ab_ce_n),
    .write_n      (ab_write_n),
    .icap_busy    (icap_busy),
    .icap_o       (icap_o),
    .status       (status),
    .status_valid (status_valid)
  );

  // ICAP multiplexer: abort sequence generator or normal data path
  always_comb begin
    if (state == prmu_pkg::MC_ABORT) begin
      icap_ce_n    = ab_ce_n;
      icap_write_n = ab_write_n;
      icap_i       = '0;
    end else begin
      icap_ce_n    = !ack;
      icap_write_n = 1'b0;
      for (int i = 0; i < SUB_W; i++)
        icap_i[(i / 8) * 8 + 7 - (i % 8)] = data[i];
    end
  end

endmodule
