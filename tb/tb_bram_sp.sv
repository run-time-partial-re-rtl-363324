// tb_bram_sp: self-checking test of the single-port block RAM. It writes
// random words to random addresses, keeps a reference copy, and checks that a
// read shows the word one clock after the address (registered output), that
// the output holds while enable is low, and that a write returns the old
// contents on the same clock (read-first).
module tb_bram_sp;
  localparam int AW = 8, W = 32;

  logic clk = 0;
  always #5 clk = ~clk;

  logic          en, we;
  logic [AW-1:0] addr;
  logic [W-1:0]  din, dout, held;
  logic [W-1:0]  ref_mem [2**AW];
  int checks = 0, failures = 0;

  bram_sp #(.AW(AW), .W(W)) dut (.*);

  initial begin
    en = 0; we = 0; addr = '0; din = '0;
    // fill everything
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = AW'(a); din = $urandom; ref_mem[a] = din;
    end
    @(negedge clk); we = 0;
    // random reads
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      en = 1; we = 0; addr = AW'($urandom);
      @(negedge clk);
      checks++;
      if (dout !== ref_mem[addr]) begin failures++; $display("read %0d: %h exp %h", addr, dout, ref_mem[addr]); end
      // hold with enable low
      held = dout; en = 0; addr = addr + 1'b1;
      @(negedge clk);
      checks++;
      if (dout !== held) begin failures++; $display("output changed while disabled"); end
    end
    // read-first on write
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      en = 1; we = 1; addr = AW'($urandom); din = $urandom;
      @(negedge clk);
      checks++;
      if (dout !== ref_mem[addr]) begin failures++; $display("write %0d: old %h got %h", addr, ref_mem[addr], dout); end
      ref_mem[addr] = din;
      we = 0;
      @(negedge clk);
      checks++;
      if (dout !== din) begin failures++; $display("readback %0d: %h exp %h", addr, dout, din); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
