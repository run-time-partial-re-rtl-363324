// offchip_repo_if: off-chip repository interface. It fetches a bitstream
// from memory on the processor local bus, through an external FIFO, and
// offers it word by word on the handshaking port.
//
// Fetching side (bus master port, one request outstanding at a time):
// on repository_select the interface clears the FIFO and requests a single
// bus word at start_address, which holds the 64-bit length field (number of
// 32-bit bitstream words). That word goes into the FIFO like all others; the
// fetcher also reads it to work out how many BURST-word bursts cover the
// bitstream, ceil(length / (BURST * BUS_W / W)). A burst is requested only
// while the FIFO has room for the whole burst; the next burst follows at the
// next bus address once all its beats have arrived.
// Output side: the first FIFO word is taken as the length (bs_length,
// bs_length_valid); the rest pass through a width adapter (BUS_W to W, upper
// half first) to the handshaking port. valid is withheld after `length`
// words, so padding in the last bus word or burst never leaves the interface.
// Bus master port: m_req stays high with m_addr (bus-word address) and
// m_len (beats) until m_gnt; data then returns as m_len pulses of m_rvalid.
// This port is a simplified stand-in for the PLB IP interface, which the
// document names but does not specify. A repository_select during a transfer
// lets the outstanding beats arrive, discards them, and then restarts.
// The bus width, the address unit (one bus word), the port and the restart
// behaviour are this design's choices.
module offchip_repo_if #(
  parameter int unsigned ADDR_W     = 24,
  parameter int unsigned BUS_W      = 64,
  parameter int unsigned W          = 32,
  parameter int unsigned LEN_W      = 64,
  parameter int unsigned BURST      = 16,
  parameter int unsigned FIFO_DEPTH = 32
) (
  input  logic                            clk,
  input  logic                            rst,
  // repository port
  input  logic                            repository_select,
  input  logic [ADDR_W-1:0]               start_address,
  output logic [LEN_W-1:0]                bs_length,
  output logic                            bs_length_valid,
  output logic                            valid,
  input  logic                            ack,
  output logic [W-1:0]                    data_out,
  // bus master port
  output logic                            m_req,
  output logic [ADDR_W-1:0]               m_addr,
  output logic [$clog2(BURST+1)-1:0]      m_len,
  input  logic                            m_gnt,
  input  logic [BUS_W-1:0]                m_rdata,
  input  logic                            m_rvalid,
  // FIFO port
  output logic                            fifo_clear,
  output logic                            fifo_wr_en,
  output logic [BUS_W-1:0]                fifo_wdata,
  output logic                            fifo_rd_en,
  input  logic [BUS_W-1:0]                fifo_rdata,
  input  logic                            fifo_empty,
  input  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count
);

  localparam int unsigned LW    = $clog2(BURST + 1);
  localparam int unsigned WPB   = BURST * (BUS_W / W);        // words per burst
  localparam int unsigned WPB_L = $clog2(WPB);
  localparam int unsigned CW    = $clog2(FIFO_DEPTH + 1);

  typedef enum logic [2:0] {F_IDLE, F_LREQ, F_LDATA, F_CHECK, F_BREQ, F_BDATA} fetch_state_e;
  typedef enum logic [1:0] {O_IDLE, O_LEN, O_STREAM} out_state_e;

  fetch_state_e     fstate;
  out_state_e       ostate;
  logic [ADDR_W-1:0] addr_reg, restart_addr;
  logic [LEN_W-1:0]  bursts_left;
  logic [LW-1:0]     beat_cnt;
  logic              restart;      // a select arrived while beats were due
  logic [LEN_W-1:0]  hdr_len;
  logic [LEN_W-1:0]  words_out;
  logic              wa_valid_in, wa_ack_in, wa_valid_out, wa_ack_out;
  logic [W-1:0]      wa_data;
  logic              busy_xfer;

  assign hdr_len    = m_rdata[LEN_W-1:0];
  assign busy_xfer  = (fstate == F_LDATA) || (fstate == F_BDATA);

  // ---------------- fetching side ----------------
  assign fifo_clear = repository_select;
  assign m_req      = (fstate == F_LREQ) || (fstate == F_BREQ);
  assign m_addr     = addr_reg;
  assign m_len      = (fstate == F_BREQ) ? LW'(BURST) : LW'(1);
  assign fifo_wdata = m_rdata;
  assign fifo_wr_en = busy_xfer && m_rvalid && !restart && !repository_select;

  always_ff @(posedge clk) begin
    if (rst) begin
      fstate       <= F_IDLE;
      addr_reg     <= '0;
      restart_addr <= '0;
      bursts_left  <= '0;
      beat_cnt     <= '0;
      restart      <= 1'b0;
    end else if (repository_select && (busy_xfer || (m_req && m_gnt))) begin
      // beats are still due: let them arrive and drop them
      restart      <= 1'b1;
      restart_addr <= start_address;
      if (!busy_xfer) begin
        fstate   <= (fstate == F_BREQ) ? F_BDATA : F_LDATA;
        beat_cnt <= '0;
      end else if (m_rvalid) begin
        beat_cnt <= beat_cnt + 1'b1;
        if (fstate == F_LDATA || beat_cnt == LW'(BURST - 1)) begin
          fstate   <= F_LREQ;
          addr_reg <= start_address;
          restart  <= 1'b0;
        end
      end
    end else if (repository_select) begin
      fstate   <= F_LREQ;
      addr_reg <= start_address;
      restart  <= 1'b0;
    end else begin
      unique case (fstate)
        F_IDLE: ;
        F_LREQ: if (m_gnt) fstate <= F_LDATA;
        F_LDATA: if (m_rvalid) begin
          if (restart) begin
            fstate   <= F_LREQ;
            addr_reg <= restart_addr;
            restart  <= 1'b0;
          end else begin
            bursts_left <= (hdr_len >> WPB_L) + LEN_W'(hdr_len[WPB_L-1:0] != '0);
            addr_reg    <= addr_reg + 1'b1;
            fstate      <= F_CHECK;
          end
        end
        F_CHECK: begin
          if (bursts_left == '0)
            fstate <= F_IDLE;
          else if (CW'(FIFO_DEPTH) - fifo_count >= CW'(BURST))
            fstate <= F_BREQ;
        end
        F_BREQ: if (m_gnt) begin
          fstate   <= F_BDATA;
          beat_cnt <= '0;
        end
        F_BDATA: if (m_rvalid) begin
          beat_cnt <= beat_cnt + 1'b1;
          if (beat_cnt == LW'(BURST - 1)) begin
            if (restart) begin
              fstate   <= F_LREQ;
              addr_reg <= restart_addr;
              restart  <= 1'b0;
            end else begin
              addr_reg    <= addr_reg + ADDR_W'(BURST);
              bursts_left <= bursts_left - 1'b1;
              fstate      <= F_CHECK;
            end
          end
        end
        default: fstate <= F_IDLE;
      endcase
    end
  end

  // ---------------- output side ----------------
  assign wa_valid_in = (ostate == O_STREAM) && !fifo_empty;
  assign fifo_rd_en  = ((ostate == O_LEN) && !fifo_empty && !repository_select) ||
                       (wa_ack_in && !repository_select);
  assign valid       = wa_valid_out && (words_out != bs_length);
  assign wa_ack_out  = valid && ack;
  assign data_out    = wa_data;

  width_adapter #(.IN_W(BUS_W), .OUT_W(W)) u_split (
    .clk, .rst,
    .clear      (repository_select),
    .valid_prev (wa_valid_in),
    .ack_prev   (wa_ack_in),
    .data_in    (fifo_rdata),
    .valid_next (wa_valid_out),
    .ack_next   (wa_ack_out),
    .data_out   (wa_data)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      ostate          <= O_IDLE;
      bs_length       <= '0;
      bs_length_valid <= 1'b0;
      words_out       <= '0;
    end else if (repository_select) begin
      ostate          <= O_LEN;
      bs_length_valid <= 1'b0;
      words_out       <= '0;
    end else begin
      unique case (ostate)
        O_IDLE: ;
        O_LEN: if (!fifo_empty) begin
          bs_length       <= fifo_rdata[LEN_W-1:0];
          bs_length_valid <= 1'b1;
          ostate          <= O_STREAM;
        end
        O_STREAM: if (wa_ack_out) words_out <= words_out + 1'b1;
        default: ostate <= O_IDLE;
      endcase
    end
  end

  initial begin
    assert (WPB == 2**WPB_L) else $error("offchip_repo_if: words per burst must be a power of two");
  end

endmodule
