// tb_prmu_top: end-to-end test of the PRMU at its default sizes, with the
// ICAP model and the bus memory model.
// Bitstreams are generated with the shape of a real partial bitstream (dummy
// word, synchronisation word, command and frame-address packets, frame data,
// de-synchronisation word, no-operation word). The on-chip repository holds
// a 4784-word (19136-byte) and a 5888-word (23552-byte) bitstream back to
// back, the sizes of the two slot bitstreams measured in the design's
// evaluation, and a short one after a gap; the off-chip memory holds two
// more. Scenarios, each checked byte for byte at the ICAP:
//   1  single bitstream from the on-chip repository at full speed: one byte
//      per clock, start to end_op = bytes + fixed overhead
//   2  the next bitstream, stored directly after the first
//   3  a bitstream after a gap, with the ICAP busy at random; a second
//      start_op during the run must be ignored
//   4  start_op without `set` (an execute request) must not start anything
//   5  off-chip repository with bus gaps and a busy ICAP; bursts are held
//      back while the FIFO lacks room
//   6  abort in the middle of an off-chip run, status read back, then a full
//      on-chip run that must be clean
// Each mechanism (busy stall, burst hold-back, abort, ignored request,
// repository switch) is counted; one that never happens is a failure.
module tb_prmu_top;
  localparam int BURST = 16;
  localparam logic [31:0] STATUS = 32'h0000_3A5C;

  logic clk = 0, rst = 1;
  always #10 clk = ~clk;   // 50 MHz

  logic        start_op, set, end_op, abort_req, aborted, status_valid;
  logic [23:0] mc_address, m_addr;
  logic [31:0] status, load_data;
  logic        load_en;
  logic [13:0] load_addr;
  logic        m_req, m_gnt, m_rvalid;
  logic [4:0]  m_len;
  logic [63:0] m_rdata;
  logic        icap_ce_n, icap_write_n, icap_busy;
  logic [7:0]  icap_i, icap_o;

  int checks = 0, failures = 0;
  int outstanding = 0, beats = 0, beats_due = 0, idle_run = 0;
  int n_busy_runs = 0, n_holdback = 0, n_abort = 0, n_ignored = 0, n_onchip = 0, n_offchip = 0;
  int cyc;

  prmu_top dut (.*);
  icap_model #(.W(8), .DEPTH(65536), .BUSY_PCT(0), .STATUS(STATUS)) u_icap (
    .clk, .ce_n(icap_ce_n), .write_n(icap_write_n), .i(icap_i), .busy(icap_busy), .o(icap_o)
  );
  plb_mem_model #(.AW(14), .W(64), .LW(5), .MAX_GNT_DELAY(4), .GAP_PCT(0)) u_mem (.*);

  // ---------------- bitstream images ----------------
  function automatic logic [31:0] bs_word(int id, int k, int len);
    if (k == 0)       return 32'hFFFF_FFFF;             // dummy word
    if (k == 1)       return 32'hAA99_5566;             // synchronisation word
    if (k == 2)       return 32'h3000_8001;             // type 1: write 1 word to CMD
    if (k == 3)       return 32'h0000_0001;             // WCFG
    if (k == 4)       return 32'h3000_2001;             // type 1: write 1 word to FAR
    if (k == 5)       return 32'(id) << 17;             // frame address
    if (k == 6)       return 32'h3000_4000;             // type 1: FDRI, count in type 2
    if (k == 7)       return 32'h5000_0000 | 32'(len - 11);
    if (k == len - 3) return 32'h3000_8001;
    if (k == len - 2) return 32'h0000_000D;             // de-synchronisation word
    if (k == len - 1) return 32'h2000_0000;             // no operation
    return (32'(k) * 32'h9E37_79B1) ^ (32'(id) * 32'h0101_0101);
  endfunction

  task automatic load_onchip(input int id, input int at, input int len);
    for (int k = -2; k < len; k++) begin
      @(negedge clk);
      load_en   = 1;
      load_addr = 14'(at + 2 + k);
      load_data = (k == -2) ? 32'h0 : (k == -1) ? 32'(len) : bs_word(id, k, len);
    end
    @(negedge clk);
    load_en = 0;
  endtask

  task automatic store_offchip(input int id, input int at, input int len);
    u_mem.mem[at] = 64'(len);
    for (int j = 0; j < (len + 1) / 2; j++)
      u_mem.mem[at + 1 + j] = {bs_word(id, 2 * j, len), (2 * j + 1 < len) ? bs_word(id, 2 * j + 1, len) : 32'h2000_0000};
  endtask

  // ---------------- bus observation ----------------
  always @(posedge clk) begin
    if (m_req && m_gnt) outstanding += int'(m_len);
    if (m_rvalid) begin outstanding--; beats++; end
    // the bus sits idle for several clocks in the middle of a transfer only
    // when the PRMU waits for room in its FIFO
    if (!m_req && outstanding == 0 && beats > 0 && beats < beats_due) idle_run++;
    else idle_run = 0;
    if (idle_run == 4) n_holdback++;
  end

  // ---------------- helpers ----------------
  task automatic request(input logic [23:0] addr, input logic s);
    @(negedge clk);
    start_op = 1; set = s; mc_address = addr;
    @(negedge clk);
    start_op = 0; set = 0;
  endtask

  task automatic check_icap(input int id, input int len, input string what);
    int bad = 0;
    checks++;
    if (u_icap.nwords != 4 * len) begin failures++; $display("%s: %0d bytes written, expected %0d", what, u_icap.nwords, 4 * len); end
    for (int b = 0; b < 4 * len; b++) begin
      logic [31:0] w;
      w = bs_word(id, b / 4, len);
      if (u_icap.mem[b] !== w[31 - 8 * (b % 4) -: 8]) begin
        if (bad < 5) $display("%s: byte %0d = %h, expected %h", what, b, u_icap.mem[b], w[31 - 8 * (b % 4) -: 8]);
        bad++;
      end
    end
    checks++;
    if (bad != 0) failures++;
  endtask

  // run a re-configuration; returns the clocks from start_op to end_op
  task automatic run(input int id, input logic [23:0] addr, input int len, input string what, output int clocks);
    u_icap.nwords = 0;
    @(negedge clk);
    start_op = 1; set = 1; mc_address = addr;
    clocks = 1;
    @(negedge clk);
    start_op = 0; set = 0;
    while (!end_op && clocks < 20 * len + 1000) begin @(negedge clk); clocks++; end
    checks++;
    if (!end_op || aborted) begin failures++; $display("%s: no clean end_op (aborted %0b)", what, aborted); end
    @(negedge clk);
    check_icap(id, len, what);
    $display("%s: %0d words (%0d bytes) in %0d clocks", what, len, 4 * len, clocks);
  endtask

  localparam int LEN_A = 4784, LEN_B = 5888, LEN_C = 700, LEN_D = 2001, LEN_E = 3000;
  localparam int AT_A = 0, AT_B = AT_A + 2 + LEN_A, AT_C = 12000;
  localparam int AT_D = 16, AT_E = 3000;
  localparam logic [23:0] OFF = 24'h80_0000;

  int clocks, n_prev;

  initial begin
    start_op = 0; set = 0; mc_address = '0; abort_req = 0;
    load_en = 0; load_addr = '0; load_data = '0;
    for (int a = 0; a < 2**14; a++) u_mem.mem[a] = 64'hDEAD_BEEF_0BAD_F00D;
    store_offchip(4, AT_D, LEN_D);
    store_offchip(5, AT_E, LEN_E);
    repeat (4) @(posedge clk);
    rst <= 0;
    load_onchip(1, AT_A, LEN_A);
    load_onchip(2, AT_B, LEN_B);
    load_onchip(3, AT_C, LEN_C);

    // 1: single bitstream, full speed
    run(1, 24'(AT_A), LEN_A, "on-chip slot-1 bitstream", clocks);
    n_onchip++;
    checks++;
    if (clocks != 4 * LEN_A + 5) begin failures++; $display("overhead %0d clocks, expected 5", clocks - 4 * LEN_A); end
    // 2: the bitstream stored right after it
    run(2, 24'(AT_B), LEN_B, "on-chip slot-2 bitstream (successive)", clocks);
    n_onchip++;
    checks++;
    if (clocks != 4 * LEN_B + 5) begin failures++; $display("overhead %0d clocks, expected 5", clocks - 4 * LEN_B); end
    // 3: after a gap, ICAP busy; a second request in the middle is ignored
    u_icap.busy_pct = 15;
    n_prev = u_icap.nbusy;
    fork
      run(3, 24'(AT_C), LEN_C, "on-chip bitstream after a gap, ICAP busy", clocks);
      begin
        repeat (300) @(negedge clk);
        request(OFF | 24'(AT_D), 1'b1);
        n_ignored++;
      end
    join
    n_onchip++;
    if (u_icap.nbusy > n_prev) n_busy_runs++;
    checks++;
    if (clocks <= 4 * LEN_C + 5) begin failures++; $display("busy ICAP did not slow the run"); end
    // 4: execute request (set low) must not start a re-configuration
    u_icap.nwords = 0;
    request(24'(AT_A), 1'b0);
    cyc = 0;
    while (!end_op && cyc < 200) begin @(negedge clk); cyc++; end
    checks++;
    if (end_op || u_icap.nwords != 0) begin failures++; $display("execute request started a re-configuration"); end
    else n_ignored++;
    // 5: off-chip repository, bus gaps and ICAP busy
    u_mem.gap_pct = 30;
    beats = 0; beats_due = 1 + BURST * ((LEN_D + 31) / 32);
    n_prev = u_icap.nbusy;
    run(4, OFF | 24'(AT_D), LEN_D, "off-chip bitstream, bus gaps, ICAP busy", clocks);
    n_offchip++;
    if (u_icap.nbusy > n_prev) n_busy_runs++;
    // 6: abort an off-chip run, then a clean on-chip run
    u_icap.busy_pct = 0;
    u_icap.nwords = 0;
    n_prev = u_icap.naborts;
    beats = 0; beats_due = 1 + BURST * ((LEN_E + 31) / 32);
    request(OFF | 24'(AT_E), 1'b1);
    while (u_icap.nwords < 5000) @(negedge clk);
    abort_req = 1;
    @(negedge clk);
    abort_req = 0;
    cyc = 0;
    while (!end_op && cyc < 100) begin @(negedge clk); cyc++; end
    @(negedge clk);
    checks++;
    if (!aborted || !status_valid || status !== STATUS || u_icap.naborts != n_prev + 1) begin
      failures++; $display("abort: aborted %0b status %h aborts %0d", aborted, status, u_icap.naborts - n_prev);
    end else n_abort++;
    u_mem.gap_pct = 0;
    run(1, 24'(AT_A), LEN_A, "on-chip slot-1 bitstream after abort", clocks);
    n_onchip++;
    checks++;
    if (clocks != 4 * LEN_A + 5) begin failures++; $display("after abort: overhead %0d clocks", clocks - 4 * LEN_A); end

    // mechanisms
    $display("mechanisms: busy-stalled runs %0d, burst hold-backs %0d, aborts %0d, ignored requests %0d, on-chip runs %0d, off-chip runs %0d",
             n_busy_runs, n_holdback, n_abort, n_ignored, n_onchip, n_offchip);
    checks++; if (n_busy_runs == 0) begin failures++; $display("ICAP busy never stalled a run"); end
    checks++; if (n_holdback == 0) begin failures++; $display("no burst was held back"); end
    checks++; if (n_abort == 0)    begin failures++; $display("no abort"); end
    checks++; if (n_ignored < 2)   begin failures++; $display("requests not ignored"); end
    checks++; if (n_onchip == 0 || n_offchip == 0) begin failures++; $display("a repository was never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
