// tb_offchip_repo_if: self-checking test of the off-chip repository interface
// with the FIFO and a bus memory model that grants late and leaves gaps.
// Bitstreams of even and odd length, back to back and after a gap, are read
// with a random and with a slow acknowledge. Checks: the length, every 32-bit
// word in order (upper half of each bus word first), that valid stops after
// `length` words, the number of bursts (length / 32 rounded up), that a burst
// is granted only while the FIFO has room for it, that at least once a burst
// was held back for lack of room, and a restart by a new select while a
// burst is in flight.
module tb_offchip_repo_if;
  localparam int ADDR_W = 24, BUS_W = 64, BURST = 16, DEPTH = 32;
  localparam int LW = $clog2(BURST + 1), CW = $clog2(DEPTH + 1);

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic              repository_select, bs_length_valid, valid, ack;
  logic [ADDR_W-1:0] start_address, m_addr;
  logic [31:0]       bs_length, data_out;
  logic              m_req, m_gnt, m_rvalid;
  logic [LW-1:0]     m_len;
  logic [BUS_W-1:0]  m_rdata, fifo_wdata, fifo_rdata;
  logic              fifo_clear, fifo_wr_en, fifo_rd_en, fifo_empty, fifo_full;
  logic [CW-1:0]     fifo_count;
  int checks = 0, failures = 0;
  int ack_pct, nrecv, cyc, bursts0, nheld = 0, outstanding = 0, beats = 0, beats_due = 0;

  offchip_repo_if #(.ADDR_W(ADDR_W), .BUS_W(BUS_W), .W(32), .LEN_W(32),
                    .BURST(BURST), .FIFO_DEPTH(DEPTH)) dut (.*);
  sync_fifo #(.W(BUS_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst, .clear(fifo_clear), .wr_en(fifo_wr_en), .wdata(fifo_wdata), .full(fifo_full),
    .rd_en(fifo_rd_en), .rdata(fifo_rdata), .empty(fifo_empty), .count(fifo_count)
  );
  plb_mem_model #(.AW(12), .W(BUS_W), .LW(LW), .MAX_GNT_DELAY(3), .GAP_PCT(20)) u_mem (.*);

  function automatic logic [31:0] word(int bs, int k);
    return 32'(bs) << 28 | 32'(k) * 32'h0000_1011;
  endfunction

  task automatic store(input int bs, input int at, input int len);
    u_mem.mem[at] = 64'(len);
    for (int k = 0; k < (len + 1) / 2; k++)
      u_mem.mem[at + 1 + k] = {word(bs, 2 * k), (2 * k + 1 < len) ? word(bs, 2 * k + 1) : 32'hFFFF_FFFF};
  endtask

  always @(posedge clk) ack <= ($urandom % 100) < ack_pct;

  // bursts only when the FIFO has room for all of them
  always @(posedge clk) begin
    if (m_req && m_gnt && m_len > 1) begin
      checks++;
      if (DEPTH - int'(fifo_count) < BURST) begin failures++; $display("burst granted with %0d words in FIFO", fifo_count); end
    end
    if (m_req && m_gnt) outstanding += int'(m_len);
    if (m_rvalid) begin outstanding--; beats++; end
    if (!m_req && outstanding == 0 && beats < beats_due && DEPTH - int'(fifo_count) < BURST) nheld++;
  end

  task automatic fetch(input int bs, input int at, input int len, input int pct);
    ack_pct = pct;
    bursts0 = u_mem.nburst;
    beats = 0;
    beats_due = 1 + BURST * ((len + 31) / 32);
    @(negedge clk);
    repository_select = 1; start_address = ADDR_W'(at);
    @(negedge clk);
    repository_select = 0;
    cyc = 0;
    while (!bs_length_valid && cyc < 100) begin @(negedge clk); cyc++; end
    checks++;
    if (bs_length != 32'(len)) begin failures++; $display("bs %0d: length %0d", bs, bs_length); end
    nrecv = 0; cyc = 0;
    while (nrecv < len && cyc < 20 * len + 100) begin
      @(posedge clk);
      cyc++;
      if (valid && ack) begin
        checks++;
        if (data_out !== word(bs, nrecv)) begin failures++; $display("bs %0d word %0d = %h", bs, nrecv, data_out); end
        nrecv++;
      end
    end
    repeat (30) @(negedge clk);
    checks++;
    if (valid || nrecv != len) begin failures++; $display("bs %0d: %0d words, valid %0b at end", bs, nrecv, valid); end
    checks++;
    if (u_mem.nburst - bursts0 != (len + 31) / 32) begin
      failures++; $display("bs %0d: %0d bursts", bs, u_mem.nburst - bursts0);
    end
  endtask

  initial begin
    repository_select = 0; start_address = '0; ack_pct = 0;
    for (int a = 0; a < 4096; a++) u_mem.mem[a] = {32'hBAD0_0000 | 32'(a), 32'hBAD1_0000 | 32'(a)};
    store(1, 0, 100);
    store(2, 51, 33);       // directly after bitstream 1
    store(3, 400, 257);     // after a gap
    repeat (3) @(posedge clk);
    rst <= 0;
    fetch(1, 0, 100, 70);
    fetch(2, 51, 33, 100);
    fetch(3, 400, 257, 20);  // slow consumer: the FIFO fills up
    // restart while a burst is in flight
    ack_pct = 100;
    @(negedge clk); repository_select = 1; start_address = 400;
    @(negedge clk); repository_select = 0;
    repeat (3) begin
      @(posedge clk);
      while (!m_rvalid) @(posedge clk);
    end
    @(negedge clk);
    fetch(2, 51, 33, 60);
    checks++;
    if (nheld == 0) begin failures++; $display("no burst was ever held back"); end
    $display("bursts held back for room in %0d clocks", nheld);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
