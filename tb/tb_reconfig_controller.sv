// tb_reconfig_controller: self-checking test of the re-configuration
// controller with the ICAP model.
// Run 1: a random-valid byte source and a busy ICAP; checks every byte the
//        ICAP receives (after undoing the bit swap), that exactly 4*length
//        bytes are written, one end_op pulse, and the return to Idle.
// Run 2: data always valid, ICAP never busy; checks one byte per clock: the
//        time from start to end_op is the byte count plus three clocks.
// Run 3: an abort in the middle; checks the abort sequence reached the ICAP,
//        the status word, `aborted` and end_op, and that no more data went in.
module tb_reconfig_controller;
  localparam logic [31:0] STATUS = 32'h1357_9BDF;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        start, abort_req, end_op, aborted, length_valid, valid, ack;
  logic        icap_ce_n, icap_write_n, icap_busy, status_valid;
  logic [31:0] length, status;
  logic [7:0]  data, icap_i, icap_o;
  prmu_pkg::mc_state_e state;
  int checks = 0, failures = 0;
  int sent, src_pct, nend, base, cyc;
  int unsigned busy_pct;

  reconfig_controller #(.SUB_W(8), .WORD_W(32), .LEN_W(32), .STATUS_BYTES(4)) dut (.*);
  icap_model #(.W(8), .DEPTH(4096), .BUSY_PCT(25), .STATUS(STATUS)) u_icap (
    .clk, .ce_n(icap_ce_n), .write_n(icap_write_n), .i(icap_i), .busy(icap_busy), .o(icap_o)
  );

  function automatic logic [7:0] pattern(int k);
    return 8'(k * 37 + 11);
  endfunction

  always @(posedge clk) begin
    if (valid && ack) sent <= sent + 1;
    if (!valid || ack) valid <= ($urandom % 100) < src_pct;
    if (end_op) nend <= nend + 1;
  end
  assign data = pattern(sent);

  task automatic run_start;
    start = 1; @(posedge clk); #1; start = 0;
  endtask

  initial begin
    start = 0; abort_req = 0; length_valid = 0; length = 0; valid = 0;
    sent = 0; nend = 0; src_pct = 70;
    repeat (3) @(posedge clk);
    rst <= 0;
    // ---- run 1 ----
    @(posedge clk); #1;
    run_start();
    repeat (3) @(posedge clk);
    #1 length = 100; length_valid = 1;       // 100 words = 400 bytes
    wait (end_op); @(posedge clk); #1;
    repeat (10) @(posedge clk); #1;
    checks++;
    if (u_icap.nwords != 400) begin failures++; $display("run1: %0d bytes written", u_icap.nwords); end
    for (int k = 0; k < 400; k++) begin
      checks++;
      if (u_icap.mem[k] !== pattern(k)) begin failures++; $display("run1: byte %0d = %h", k, u_icap.mem[k]); end
    end
    checks++;
    if (nend != 1 || state != prmu_pkg::MC_IDLE || aborted) begin failures++; $display("run1: end_op %0d state %0d", nend, state); end
    checks++;
    if (u_icap.nbusy == 0) begin failures++; $display("run1: ICAP was never busy"); end
    // ---- run 2: full rate ----
    src_pct = 100;
    u_icap.nwords = 0;
    base = sent;
    wait (valid); @(posedge clk); #1;
    force u_icap.busy = 1'b0;
    length = 50;
    run_start();
    cyc = 1;
    while (!end_op) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != 200 + 3) begin failures++; $display("run2: 200 bytes took %0d clocks", cyc); end
    checks++;
    if (u_icap.nwords != 200) begin failures++; $display("run2: %0d bytes", u_icap.nwords); end
    for (int k = 0; k < 200; k++) begin
      checks++;
      if (u_icap.mem[k] !== pattern(base + k)) begin failures++; $display("run2: byte %0d = %h", k, u_icap.mem[k]); end
    end
    release u_icap.busy;
    // ---- run 3: abort ----
    u_icap.nwords = 0;
    length = 1000;
    run_start();
    repeat (40) @(posedge clk); #1;
    abort_req = 1; @(posedge clk); #1; abort_req = 0;
    cyc = 0;
    while (!end_op && cyc < 100) begin @(posedge clk); #1; cyc++; end
    @(posedge clk); #1;
    checks++;
    if (!aborted || !status_valid || status !== STATUS) begin
      failures++; $display("run3: aborted %0b status %h valid %0b", aborted, status, status_valid);
    end
    checks++;
    if (u_icap.naborts != 1) begin failures++; $display("run3: ICAP saw %0d aborts", u_icap.naborts); end
    checks++;
    if (u_icap.nwords > 45 || state != prmu_pkg::MC_IDLE) begin failures++; $display("run3: %0d bytes, state %0d", u_icap.nwords, state); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
