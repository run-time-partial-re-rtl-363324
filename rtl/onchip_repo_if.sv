// onchip_repo_if: on-chip repository interface. It reads a stored bitstream
// out of a block RAM and offers it, word by word, on the handshaking port.
//
// A stored bitstream is a 64-bit length field (the number of 32-bit bitstream
// words, kept here as two RAM words, upper half first) followed by the
// bitstream. On repository_select the interface reads the two header words at
// start_address, presents the length on bs_length with bs_length_valid, and
// then works as a read-only FIFO: the read pointer starts at the first
// bitstream word, the end pointer is start + 2 + length, valid is high while
// the two differ, and an acknowledge advances the read pointer.
// The RAM has a one-cycle registered read. To keep up one word per clock the
// interface always addresses the word it will present next: the read pointer,
// or the read pointer plus one in a cycle that acknowledges. So the first word
// is valid three clocks after repository_select (together with
// bs_length_valid), and afterwards a word is available every clock.
// A new repository_select restarts the sequence at any time.
// The two-word header layout and the RAM address unit (one 32-bit word) are
// this design's choice; the document gives a 64-bit length word.
// Address bits above AW select nothing inside the RAM and are left unused
// (lint reports them).
module onchip_repo_if #(
  parameter int unsigned AW     = 14,   // RAM address width
  parameter int unsigned ADDR_W = 24,   // bitstream address width
  parameter int unsigned W      = 32,
  parameter int unsigned LEN_W  = 64
) (
  input  logic              clk,
  input  logic              rst,
  // repository port
  input  logic              repository_select,
  input  logic [ADDR_W-1:0] start_address,
  output logic [LEN_W-1:0]  bs_length,
  output logic              bs_length_valid,
  output logic              valid,
  input  logic              ack,
  output logic [W-1:0]      data_out,
  // block RAM port
  output logic              bram_en,
  output logic [AW-1:0]     bram_addr,
  input  logic [W-1:0]      bram_dout
);

  typedef enum logic [1:0] {R_IDLE, R_HDR_HI, R_HDR_LO, R_STREAM} rep_state_e;

  rep_state_e  state;
  logic [AW-1:0] base, rd_ptr, end_ptr;
  logic [W-1:0]  hdr_hi;
  logic [63:0]   header;

  assign header   = {hdr_hi, bram_dout};
  assign data_out = bram_dout;
  assign valid    = (state == R_STREAM) && (rd_ptr != end_ptr);

  always_comb begin
    bram_en   = 1'b1;
    bram_addr = rd_ptr;
    if (repository_select) begin
      bram_addr = start_address[AW-1:0];
    end else begin
      unique case (state)
        R_IDLE:   bram_en = 1'b0;
        R_HDR_HI: bram_addr = base + AW'(1);
        R_HDR_LO: bram_addr = base + AW'(2);
        R_STREAM: bram_addr = (valid && ack) ? rd_ptr + AW'(1) : rd_ptr;
        default:  bram_en = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state           <= R_IDLE;
      base            <= '0;
      rd_ptr          <= '0;
      end_ptr         <= '0;
      hdr_hi          <= '0;
      bs_length       <= '0;
      bs_length_valid <= 1'b0;
    end else if (repository_select) begin
      state           <= R_HDR_HI;
      base            <= start_address[AW-1:0];
      bs_length_valid <= 1'b0;
    end else begin
      unique case (state)
        R_IDLE: ;
        R_HDR_HI: begin
          hdr_hi <= bram_dout;
          state  <= R_HDR_LO;
        end
        R_HDR_LO: begin
          bs_length       <= header[LEN_W-1:0];
          bs_length_valid <= 1'b1;
          rd_ptr          <= base + AW'(2);
          end_ptr         <= base + AW'(2) + AW'(header[LEN_W-1:0]);
          state           <= R_STREAM;
        end
        R_STREAM: if (valid && ack) rd_ptr <= rd_ptr + AW'(1);
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
