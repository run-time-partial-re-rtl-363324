// tb_reconfig_unit: self-checking test of the re-configuration unit (width
// adapter plus controller) with the ICAP model.
// Run 1: random-valid 32-bit words, ICAP busy at random; checks every byte in
//        order (most significant byte of each word first), the byte count and
//        one end_op.
// Run 2: an abort in the middle of a word, then a new start: the new run must
//        begin with the first byte of the word waiting at its input.
// Run 3: full rate; start to end_op is 4*length + 3 clocks.
module tb_reconfig_unit;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        start, abort_req, end_op, aborted, length_valid, valid, ack;
  logic        icap_ce_n, icap_write_n, icap_busy, status_valid;
  logic [31:0] length, status, data;
  logic [7:0]  icap_i, icap_o;
  prmu_pkg::mc_state_e state;
  int checks = 0, failures = 0;
  int sent, src_pct, nend, base, cyc;

  reconfig_unit #(.WORD_W(32), .ICAP_W(8), .LEN_W(32), .STATUS_BYTES(4)) dut (.*);
  icap_model #(.W(8), .DEPTH(4096), .BUSY_PCT(20)) u_icap (
    .clk, .ce_n(icap_ce_n), .write_n(icap_write_n), .i(icap_i), .busy(icap_busy), .o(icap_o)
  );

  function automatic logic [31:0] pattern(int k);
    return 32'(k) * 32'h0102_0305 + 32'hAA99_5566;
  endfunction
  function automatic logic [7:0] byte_of(int w, int b);
    logic [31:0] x;
    x = pattern(w);
    return x[31 - 8*b -: 8];
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

  task automatic check_bytes(input int first_word, input int nbytes, input string what);
    checks++;
    if (u_icap.nwords != nbytes) begin failures++; $display("%s: %0d bytes", what, u_icap.nwords); end
    for (int k = 0; k < nbytes; k++) begin
      checks++;
      if (u_icap.mem[k] !== byte_of(first_word + k / 4, k % 4)) begin
        failures++; $display("%s: byte %0d = %h", what, k, u_icap.mem[k]);
      end
    end
  endtask

  initial begin
    start = 0; abort_req = 0; length_valid = 1; length = 64; valid = 0;
    sent = 0; nend = 0; src_pct = 70;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    // ---- run 1 ----
    run_start();
    wait (end_op); @(posedge clk); #1;
    check_bytes(0, 256, "run1");
    checks++;
    if (nend != 1) begin failures++; $display("run1: %0d end_op", nend); end
    // ---- run 2: abort in the middle of a word, then restart ----
    u_icap.nwords = 0;
    length = 200;
    run_start();
    while (u_icap.nwords < 37 || u_icap.nwords % 4 == 0) begin @(posedge clk); #1; end
    abort_req = 1; @(posedge clk); #1; abort_req = 0;
    wait (end_op); @(posedge clk); #1;
    checks++;
    if (!aborted) begin failures++; $display("run2: not aborted"); end
    u_icap.nwords = 0;
    base = sent;
    length = 16;
    run_start();
    wait (end_op); @(posedge clk); #1;
    check_bytes(base, 64, "run2 restart");
    // ---- run 3: full rate ----
    src_pct = 100;
    force u_icap.busy = 1'b0;
    u_icap.nwords = 0;
    wait (valid); @(posedge clk); #1;
    base = sent;
    length = 40;
    run_start();
    cyc = 1;
    while (!end_op) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != 160 + 3) begin failures++; $display("run3: 160 bytes took %0d clocks", cyc); end
    check_bytes(base, 160, "run3");
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
