// tb_prmu: test of the PRMU core in a reduced configuration (1K-word BRAM,
// two pipeline stages between the repository selector and the
// re-configuration unit), with the memory, FIFO, ICAP and bus attached as
// in the system top.
// A series of re-configurations alternates between the on-chip and the
// off-chip repository with lengths chosen to hit the edge cases of the burst
// arithmetic (1, 2, 31, 32, 33, 64 words and random ones), at random ICAP
// busy and bus gap rates. Every byte reaching the ICAP is compared with the
// stored image (bit order inside each byte reversed at the pins, which the
// ICAP model undoes). Aborts are issued at a random point in some runs and
// must end with `aborted` and the ICAP status read back; the next run must
// then be clean. A request that arrives while a run is in progress is
// ignored, and start_op without `set` never starts a run.
module tb_prmu;
  localparam int BRAM_AW = 10, BURST = 16, DEPTH = 32;
  localparam logic [31:0] STATUS = 32'hC0DE_0042;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        start_op, set, end_op, abort_req, aborted, status_valid;
  logic [23:0] mc_address, m_addr;
  logic [31:0] status, bram_dout;
  logic        bram_en;
  logic [BRAM_AW-1:0] bram_addr;
  logic        fifo_clear, fifo_wr_en, fifo_rd_en, fifo_empty, fifo_full;
  logic [63:0] fifo_wdata, fifo_rdata, m_rdata;
  logic [5:0]  fifo_count;
  logic        m_req, m_gnt, m_rvalid;
  logic [4:0]  m_len;
  logic        icap_ce_n, icap_write_n, icap_busy;
  logic [7:0]  icap_i, icap_o;

  int checks = 0, failures = 0;

  prmu #(.BRAM_AW(BRAM_AW), .CHAIN_STAGES(2)) dut (.*);
  bram_sp #(.AW(BRAM_AW), .W(32)) u_bram (
    .clk, .en(bram_en), .we(1'b0), .addr(bram_addr), .din(32'h0), .dout(bram_dout)
  );
  sync_fifo #(.W(64), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst, .clear(fifo_clear), .wr_en(fifo_wr_en), .wdata(fifo_wdata), .full(fifo_full),
    .rd_en(fifo_rd_en), .rdata(fifo_rdata), .empty(fifo_empty), .count(fifo_count)
  );
  icap_model #(.W(8), .DEPTH(8192), .STATUS(STATUS)) u_icap (
    .clk, .ce_n(icap_ce_n), .write_n(icap_write_n), .i(icap_i), .busy(icap_busy), .o(icap_o)
  );
  plb_mem_model #(.AW(12), .W(64), .LW(5), .MAX_GNT_DELAY(5)) u_mem (.*);

  function automatic logic [31:0] img(int seed, int k);
    return (32'(k + 1) * 32'h2545_F491) ^ (32'(seed) * 32'h0F0F_3C3C) ^ 32'(k);
  endfunction

  // store one image in both repositories: on-chip at word `at`, off-chip at
  // bus word `at`
  task automatic store(input int seed, input int at, input int len);
    u_bram.mem[at]     = 32'h0;
    u_bram.mem[at + 1] = 32'(len);
    for (int k = 0; k < len; k++) u_bram.mem[at + 2 + k] = img(seed, k);
    u_mem.mem[at] = 64'(len);
    for (int j = 0; j < (len + 1) / 2; j++)
      u_mem.mem[at + 1 + j] = {img(seed, 2 * j), img(seed, 2 * j + 1)};
  endtask

  int n_abort = 0, n_ignored = 0, n_on = 0, n_off = 0, n_busy = 0;

  task automatic run(input int seed, input int at, input int len, input bit off,
                     input int abort_at, input int late_at);
    int cyc = 0, limit;
    logic [23:0] a;
    a = {off, 23'(at)};
    store(seed, at, len);
    u_icap.nwords = 0;
    @(negedge clk);
    start_op = 1; set = 1; mc_address = a;
    @(negedge clk);
    start_op = 0; set = 0;
    limit = 40 * len + 400;
    while (!end_op && cyc < limit) begin
      if (cyc == late_at) begin       // a second request while busy
        start_op = 1; set = 1; mc_address = a ^ 24'h80_0000;
      end else begin
        start_op = 0; set = 0;
      end
      abort_req = (abort_at >= 0 && u_icap.nwords == abort_at);
      if (abort_req) abort_at = -1;
      @(negedge clk);
      cyc++;
    end
    start_op = 0; set = 0; abort_req = 0;
    checks++;
    if (!end_op) begin failures++; $display("run %0d: no end_op", seed); return; end
    if (late_at >= 0 && late_at < cyc) n_ignored++;
    if (aborted) begin
      checks++;
      if (abort_at != -1 || !status_valid || status !== STATUS) begin
        failures++; $display("run %0d: aborted=%0b status %h", seed, aborted, status);
      end else n_abort++;
      // whatever was written before the abort must be a prefix of the image;
      // the last byte may be the zero written in the clock that arms the abort
      for (int b = 0; b < u_icap.nwords; b++) begin
        logic [31:0] w;
        if (b == u_icap.nwords - 1 && u_icap.mem[b] == 8'h00) break;
        w = img(seed, b / 4);
        checks++;
        if (u_icap.mem[b] !== w[31 - 8 * (b % 4) -: 8]) begin
          failures++; $display("run %0d: aborted run wrote byte %0d = %h, expected %h", seed, b, u_icap.mem[b], w[31 - 8 * (b % 4) -: 8]); break;
        end
      end
    end else begin
      int bad = 0;
      checks++;
      if (abort_at >= 0) begin failures++; $display("run %0d: abort not honoured", seed); end
      checks++;
      if (u_icap.nwords != 4 * len) begin
        failures++; $display("run %0d (len %0d, off %0b): %0d bytes", seed, len, off, u_icap.nwords);
      end
      for (int b = 0; b < 4 * len; b++) begin
        logic [31:0] w = img(seed, b / 4);
        if (u_icap.mem[b] !== w[31 - 8 * (b % 4) -: 8]) bad++;
      end
      checks++;
      if (bad != 0) begin failures++; $display("run %0d: %0d wrong bytes", seed, bad); end
      if (off) n_off++; else n_on++;
    end
  endtask

  int lens[] = '{1, 2, 31, 32, 33, 64, 3, 100};

  initial begin
    int len, at, nb;
    start_op = 0; set = 0; mc_address = '0; abort_req = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // fixed edge lengths on both repositories at full speed
    foreach (lens[i]) begin
      run(i, 8 * i, lens[i], 1'b0, -1, -1);
      run(100 + i, 8 * i, lens[i], 1'b1, -1, -1);
    end
    // execute requests (set low) are not re-configurations
    u_icap.nwords = 0;
    @(negedge clk); start_op = 1; set = 0; mc_address = 24'h0;
    @(negedge clk); start_op = 0;
    repeat (50) @(negedge clk);
    checks++;
    if (end_op || u_icap.nwords != 0) begin failures++; $display("execute request started a run"); end
    else n_ignored++;
    // random runs with stalls, gaps, late requests and aborts
    for (int r = 0; r < 40; r++) begin
      len = 1 + $urandom % 600;
      at  = $urandom % (2**BRAM_AW - len - 2);
      u_icap.busy_pct = (r % 3 == 0) ? 0 : 10 + $urandom % 40;
      u_mem.gap_pct   = (r % 4 == 0) ? 0 : $urandom % 60;
      nb = u_icap.nbusy;
      run(1000 + r, at, len, r[0], (r % 5 == 2) ? int'($urandom % (4 * len)) : -1,
          (r % 7 == 3) ? int'($urandom % 50) : -1);
      if (u_icap.nbusy > nb) n_busy++;
    end
    $display("on-chip %0d, off-chip %0d, aborts %0d, ignored requests %0d, busy-stalled runs %0d",
             n_on, n_off, n_abort, n_ignored, n_busy);
    checks++; if (n_abort == 0 || n_ignored < 2 || n_busy == 0 || n_on == 0 || n_off == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
