// tb_onchip_repo_if: self-checking test of the on-chip repository interface
// with a block RAM. Three bitstreams are stored: two back to back and one
// after a gap. For each, the test selects it and checks the length and its
// timing (bs_length_valid and the first valid word three clocks after the
// select), every word with a random acknowledge, that valid drops after the
// last word, the full rate of one word per clock with a constant acknowledge,
// and that a new select in the middle of a bitstream restarts cleanly.
module tb_onchip_repo_if;
  localparam int AW = 10, ADDR_W = 24;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic              repository_select, bs_length_valid, valid, ack, bram_en;
  logic [ADDR_W-1:0] start_address;
  logic [31:0]       bs_length, data_out, bram_dout;
  logic [AW-1:0]     bram_addr;
  int checks = 0, failures = 0;
  int ack_pct, nrecv, cyc;

  onchip_repo_if #(.AW(AW), .ADDR_W(ADDR_W), .W(32), .LEN_W(32)) dut (.*);
  bram_sp #(.AW(AW), .W(32)) u_bram (
    .clk, .en(bram_en), .we(1'b0), .addr(bram_addr), .din(32'h0), .dout(bram_dout)
  );

  function automatic logic [31:0] word(int bs, int k);
    return 32'(bs) << 24 | 32'(k) * 32'h0001_0003;
  endfunction

  task automatic store(input int bs, input int at, input int len);
    u_bram.mem[at]     = '0;
    u_bram.mem[at + 1] = 32'(len);
    for (int k = 0; k < len; k++) u_bram.mem[at + 2 + k] = word(bs, k);
  endtask

  always @(posedge clk) ack <= ($urandom % 100) < ack_pct;

  task automatic fetch(input int bs, input int at, input int len, input int pct);
    ack_pct = pct;
    @(negedge clk);
    repository_select = 1; start_address = ADDR_W'(at);
    @(negedge clk);
    repository_select = 0;
    cyc = 1;
    while (!bs_length_valid) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 3 || bs_length != 32'(len) || !valid) begin
      failures++; $display("bs %0d: length %0d after %0d clocks, valid %0b", bs, bs_length, cyc, valid);
    end
    nrecv = 0; cyc = 0;
    while (nrecv < len && cyc < 10 * len + 20) begin
      @(posedge clk);
      cyc++;
      if (valid && ack) begin
        checks++;
        if (data_out !== word(bs, nrecv)) begin failures++; $display("bs %0d word %0d = %h", bs, nrecv, data_out); end
        nrecv++;
      end
    end
    if (pct == 100) begin
      checks++;
      if (cyc != len) begin failures++; $display("bs %0d: %0d words in %0d clocks", bs, len, cyc); end
    end
    @(negedge clk);
    checks++;
    if (valid) begin failures++; $display("bs %0d: valid after the last word", bs); end
  endtask

  initial begin
    repository_select = 0; start_address = '0; ack_pct = 0;
    for (int a = 0; a < 2**AW; a++) u_bram.mem[a] = 32'hDEAD_0000 | 32'(a);
    store(1, 0, 50);
    store(2, 52, 30);      // directly after bitstream 1
    store(3, 300, 77);     // after a gap
    repeat (3) @(posedge clk);
    rst <= 0;
    fetch(1, 0, 50, 60);
    fetch(2, 52, 30, 100);
    fetch(3, 300, 77, 40);
    // restart in the middle
    ack_pct = 100;
    @(negedge clk); repository_select = 1; start_address = 300;
    @(negedge clk); repository_select = 0;
    repeat (12) @(negedge clk);
    fetch(1, 0, 50, 100);
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
