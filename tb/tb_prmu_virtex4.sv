// tb_prmu_virtex4: the PRMU system top scaled to a 32-bit ICAP (Virtex-4
// style, ICAP_W = 32) and clocked at 100 MHz. The width adapter then passes
// whole words, so one 32-bit word per clock reaches the ICAP: 400 MB/s.
// Checks, word for word, a 4784-word bitstream from the on-chip repository
// (start_op to end_op must take words + 5 clocks) and a 3000-word bitstream
// from the off-chip repository with the bus at full speed; for the latter the
// achieved rate is reported and must stay above 0.9 words per clock, showing
// that 16-beat bursts of 64-bit words keep up with the wider ICAP.
module tb_prmu_virtex4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;   // 100 MHz

  logic        start_op, set, end_op, abort_req, aborted, status_valid;
  logic [23:0] mc_address, m_addr;
  logic [31:0] status, load_data;
  logic        load_en;
  logic [13:0] load_addr;
  logic        m_req, m_gnt, m_rvalid;
  logic [4:0]  m_len;
  logic [63:0] m_rdata;
  logic        icap_ce_n, icap_write_n, icap_busy;
  logic [31:0] icap_i, icap_o;

  int checks = 0, failures = 0;

  prmu_top #(.ICAP_W(32)) dut (.*);
  icap_model #(.W(32), .DEPTH(8192)) u_icap (
    .clk, .ce_n(icap_ce_n), .write_n(icap_write_n), .i(icap_i), .busy(icap_busy), .o(icap_o)
  );
  plb_mem_model #(.AW(13), .W(64), .LW(5), .MAX_GNT_DELAY(2)) u_mem (.*);

  function automatic logic [31:0] img(int id, int k);
    return (32'(k) * 32'h9E37_79B1) ^ (32'(id) << 28) ^ 32'h1234_5678;
  endfunction

  task automatic run(input int id, input logic [23:0] addr, input int len, output int clocks);
    int bad = 0;
    u_icap.nwords = 0;
    @(negedge clk);
    start_op = 1; set = 1; mc_address = addr;
    clocks = 1;
    @(negedge clk);
    start_op = 0; set = 0;
    while (!end_op && clocks < 10 * len + 100) begin @(negedge clk); clocks++; end
    checks++;
    if (!end_op || aborted) begin failures++; $display("run %0d: no clean end", id); end
    @(negedge clk);
    checks++;
    if (u_icap.nwords != len) begin failures++; $display("run %0d: %0d words, expected %0d", id, u_icap.nwords, len); end
    for (int k = 0; k < len; k++) if (u_icap.mem[k] !== img(id, k)) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("run %0d: %0d wrong words", id, bad); end
    $display("run %0d: %0d words (%0d bytes) in %0d clocks", id, len, 4 * len, clocks);
  endtask

  localparam int LEN1 = 4784, LEN2 = 3000, AT2 = 8;

  initial begin
    int clocks;
    start_op = 0; set = 0; mc_address = '0; abort_req = 0;
    load_en = 0; load_addr = '0; load_data = '0;
    u_mem.mem[AT2] = 64'(LEN2);
    for (int j = 0; j < (LEN2 + 1) / 2; j++) u_mem.mem[AT2 + 1 + j] = {img(2, 2 * j), img(2, 2 * j + 1)};
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = -2; k < LEN1; k++) begin
      @(negedge clk);
      load_en = 1; load_addr = 14'(k + 2);
      load_data = (k == -2) ? 32'h0 : (k == -1) ? 32'(LEN1) : img(1, k);
    end
    @(negedge clk);
    load_en = 0;

    run(1, 24'h00_0000, LEN1, clocks);
    checks++;
    if (clocks != LEN1 + 5) begin failures++; $display("on-chip: %0d clocks, expected %0d", clocks, LEN1 + 5); end
    run(2, 24'h80_0000 | 24'(AT2), LEN2, clocks);
    checks++;
    if (10 * LEN2 < 9 * clocks) begin failures++; $display("off-chip: rate below 0.9 words per clock"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
