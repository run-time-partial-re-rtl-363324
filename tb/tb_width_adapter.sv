// tb_width_adapter: self-checking test of the width adapter (32 to 8 bits).
// A random-valid source offers words, a random-ack sink takes bytes. The test
// checks the byte order (most significant byte first), that each input word
// is acknowledged exactly once after its last byte, the full rate of one byte
// per clock when valid and ack stay high, and that `clear` restarts a word.
module tb_width_adapter;
  localparam int IN_W = 32, OUT_W = 8, NSUB = IN_W / OUT_W;
  localparam int N = 200;

  logic clk = 0, rst = 1, clear = 0;
  always #5 clk = ~clk;

  logic              valid_prev, ack_prev, valid_next, ack_next;
  logic [IN_W-1:0]   data_in;
  logic [OUT_W-1:0]  data_out;
  int checks = 0, failures = 0;
  int sent, nbytes, src_pct, snk_pct, cyc;

  width_adapter #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  function automatic logic [IN_W-1:0] pattern(int k);
    return IN_W'(k) * 32'h0101_0107 + 32'hA0B1_C2D3;
  endfunction

  always @(posedge clk) begin
    if (rst) begin
      sent <= 0;
      valid_prev <= 1'b0;
    end else begin
      if (valid_prev && ack_prev) sent <= sent + 1;
      if (!valid_prev || ack_prev)
        valid_prev <= (($urandom % 100) < src_pct) && ((valid_prev && ack_prev) ? sent + 1 < N : sent < N);
    end
  end
  assign data_in = pattern(sent);

  always @(posedge clk) begin
    if (rst) nbytes <= 0;
    else if (valid_next && ack_next) begin
      logic [IN_W-1:0] w;
      w = pattern(nbytes / NSUB);
      checks++;
      if (data_out !== w[IN_W - 1 - (nbytes % NSUB) * OUT_W -: OUT_W]) begin
        failures++;
        $display("byte %0d: got %h", nbytes, data_out);
      end
      // the input word is acknowledged together with its last byte only
      checks++;
      if (ack_prev !== ((nbytes % NSUB) == NSUB - 1)) begin
        failures++;
        $display("byte %0d: ack_prev=%0b", nbytes, ack_prev);
      end
      nbytes <= nbytes + 1;
    end
  end
  always @(posedge clk) ack_next <= ($urandom % 100) < snk_pct;

  initial begin
    src_pct = 50; snk_pct = 60;
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (nbytes == N * NSUB);
    @(posedge clk);
    // full rate
    rst <= 1; src_pct = 100; snk_pct = 100;
    repeat (2) @(posedge clk);
    rst <= 0;
    cyc = 0;
    while (nbytes < N * NSUB) begin @(posedge clk); cyc++; end
    checks++;
    if (cyc > N * NSUB + 3) begin failures++; $display("rate: %0d bytes in %0d clocks", N * NSUB, cyc); end
    // clear in the middle of a word returns to its first byte
    rst <= 1; src_pct = 0; snk_pct = 0;
    @(posedge clk); rst <= 0;
    force valid_prev = 1'b1;
    force ack_next = 1'b1;
    @(posedge clk); @(posedge clk);
    release ack_next;
    ack_next <= 1'b0;
    clear <= 1'b1;
    @(posedge clk); clear <= 1'b0;
    #1;
    checks++;
    if (data_out !== data_in[IN_W-1 -: OUT_W]) begin failures++; $display("clear did not restart the word"); end
    release valid_prev;
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
