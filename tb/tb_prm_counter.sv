// tb_prm_counter: presses the count-enable button (levels held for a random
// number of clocks, with random gaps) 40 times and checks after every press
// that the counter advanced by exactly one, modulo 16, and that holding the
// button does not keep counting. Also checks the reset value.
module tb_prm_counter;
  logic clk = 0, rst = 1, count_en = 0;
  logic [3:0] result;
  int checks = 0, failures = 0;
  logic [3:0] expected = 0;

  always #5 clk = ~clk;
  prm_counter dut (.*);

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    checks++;
    if (result !== 4'd0) begin failures++; $display("reset value %0d", result); end
    for (int p = 0; p < 40; p++) begin
      count_en = 1;
      repeat (1 + $urandom % 20) @(negedge clk);
      expected++;
      checks++;
      if (result !== expected) begin failures++; $display("press %0d: %0d, expected %0d", p, result, expected); end
      count_en = 0;
      repeat (1 + $urandom % 5) @(negedge clk);
      checks++;
      if (result !== expected) begin failures++; $display("after release %0d: %0d", p, result); end
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
