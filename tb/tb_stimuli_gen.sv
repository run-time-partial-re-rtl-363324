// tb_stimuli_gen: presses the next-vector button 40 times with random hold
// and gap lengths and checks that the vector walks 0000, 0001, ... 1111 and
// wraps, advancing exactly once per press, one clock after the press.
module tb_stimuli_gen;
  logic clk = 0, rst = 1, next_vector = 0;
  logic [3:0] stimuli;
  int checks = 0, failures = 0;
  logic [3:0] expected = 0;

  always #5 clk = ~clk;
  stimuli_gen dut (.*);

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    checks++;
    if (stimuli !== 4'd0) failures++;
    for (int p = 0; p < 40; p++) begin
      next_vector = 1;
      @(negedge clk);
      expected++;
      checks++;
      if (stimuli !== expected) begin failures++; $display("press %0d: %b, expected %b", p, stimuli, expected); end
      repeat ($urandom % 10) @(negedge clk);
      next_vector = 0;
      repeat (1 + $urandom % 5) @(negedge clk);
      checks++;
      if (stimuli !== expected) begin failures++; $display("held/released %0d: %b", p, stimuli); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
