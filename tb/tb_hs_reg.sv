// tb_hs_reg: self-checking test of the handshaking register.
// Phase 1 drives a random-valid source into the register and a random-ack
// sink behind it and checks that every word arrives once and in order.
// Phase 2 holds valid and ack high and checks the rate (one word per clock)
// and the one-clock latency through the stage.
module tb_hs_reg;
  localparam int W = 32;
  localparam int N = 300;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic         valid_prev, ack_prev, valid_next, ack_next;
  logic [W-1:0] data_in, data_out;
  int checks = 0, failures = 0;

  hs_reg #(.W(W)) dut (.*);

  int sent, recv, src_pct, snk_pct, cyc;

  function automatic logic [W-1:0] pattern(int k);
    return W'(k) * 32'h9E37_79B9 + 32'h1234;
  endfunction

  // source: offers word `sent` with random valid, holds it until acknowledged
  always_ff @(posedge clk) begin
    if (rst) begin
      sent <= 0;
      valid_prev <= 1'b0;
    end else begin
      if (valid_prev && ack_prev) sent <= sent + 1;
      valid_prev <= (($urandom % 100) < src_pct) && ((valid_prev && ack_prev) ? sent + 1 < N : sent < N);
    end
  end
  always_comb data_in = pattern((valid_prev && ack_prev) ? sent : sent);

  // sink
  always @(posedge clk) begin
    if (rst) recv <= 0;
    else if (valid_next && ack_next) begin
      checks++;
      if (data_out !== pattern(recv)) begin
        failures++;
        $display("mismatch word %0d: got %h exp %h", recv, data_out, pattern(recv));
      end
      recv <= recv + 1;
    end
  end
  always_ff @(posedge clk) ack_next <= ($urandom % 100) < snk_pct;

  initial begin
    src_pct = 60; snk_pct = 50;
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (recv == N);
    @(posedge clk);
    checks++;
    if (sent != N) begin failures++; $display("sent %0d", sent); end
    // phase 2: full rate
    rst <= 1; src_pct = 100; snk_pct = 100;
    repeat (2) @(posedge clk);
    rst <= 0;
    cyc = 0;
    while (recv < N) begin @(posedge clk); cyc++; end
    checks++;
    // first word needs one clock to enter the register, then one word per clock
    if (cyc > N + 3) begin failures++; $display("rate: %0d words took %0d clocks", N, cyc); end
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
