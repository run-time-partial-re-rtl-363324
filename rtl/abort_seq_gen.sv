// abort_seq_gen: drives the ICAP control pins through the sequence that
// cancels a pending re-configuration, and reads back the status word.
//
// The main controller of the re-configuration controller starts it with a
// one-cycle `start` and waits for the one-cycle `done`. The sequence follows
// the Virtex-II SelectMAP/ICAP abort convention: the read/write pin is switched
// to read while chip enable stays asserted, the configuration logic then
// drives its status on the data output for STATUS_BYTES byte reads, and chip
// enable is released. In order:
//   ARM      1 cycle    ce_n=0, write_n=0  (enable asserted in write mode)
//   READ     until STATUS_BYTES bytes are read with busy low; ce_n=0, write_n=1
//   RELEASE  1 cycle    ce_n=1, write_n=1, done=1
// A byte is taken from icap_o in each READ cycle where icap_busy is low, first
// byte into the most significant position of `status`.
// The document names this block and its pins (start, done, CE/Write/Busy,
// data read from the ICAP, status) but not the waveform; the sequence above,
// its byte count and its timing are this design's choice.
module abort_seq_gen #(
  parameter int unsigned ICAP_W       = 8,
  parameter int unsigned STATUS_BYTES = 4
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         start,
  output logic                         done,
  output logic                         ce_n,
  output logic                         write_n,
  input  logic                         icap_busy,
  input  logic [ICAP_W-1:0]            icap_o,
  output logic [STATUS_BYTES*8-1:0]    status,
  output logic                         status_valid
);

  typedef enum logic [1:0] {A_IDLE, A_ARM, A_READ, A_RELEASE} ab_state_e;

  localparam int unsigned CW = $clog2(STATUS_BYTES + 1);

  ab_state_e     state;
  logic [CW-1:0] nread;

  always_comb begin
    ce_n    = 1'b1;
    write_n = 1'b1;
    done    = 1'b0;
    unique case (state)
      A_IDLE:    ;
      A_ARM:     begin ce_n = 1'b0; write_n = 1'b0; end
      A_READ:    begin ce_n = 1'b0; write_n = 1'b1; end
      A_RELEASE: done = 1'b1;
      default:   ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= A_IDLE;
      nread        <= '0;
      status       <= '0;
      status_valid <= 1'b0;
    end else begin
      unique case (state)
        A_IDLE: if (start) begin
          state        <= A_ARM;
          nread        <= '0;
          status_valid <= 1'b0;
        end
        A_ARM: state <= A_READ;
        A_READ: if (!icap_busy) begin
          status <= {status[STATUS_BYTES*8-9:0], icap_o[7:0]};
          nread  <= nread + 1'b1;
          if (nread == CW'(STATUS_BYTES - 1)) state <= A_RELEASE;
        end
        A_RELEASE: begin
          state        <= A_IDLE;
          status_valid <= 1'b1;
        end
        default: state <= A_IDLE;
      endcase
    end
  end

endmodule
