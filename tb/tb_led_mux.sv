// tb_led_mux: drives random stimuli, result and select values and checks
// that the LEDs show the selected input one clock later, and reset to 0.
module tb_led_mux;
  logic clk = 0, rst = 1, show_result = 0;
  logic [3:0] stimuli = 0, result = 0, leds;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  led_mux #(.W(4)) dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (leds !== 4'd0) failures++;
    rst = 0;
    for (int k = 0; k < 200; k++) begin
      logic [3:0] want;
      show_result = 1'($urandom);
      stimuli     = 4'($urandom);
      result      = 4'($urandom);
      want        = show_result ? result : stimuli;
      @(negedge clk);
      checks++;
      if (leds !== want) begin failures++; $display("sel %0b: leds %b, expected %b", show_result, leds, want); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
