// tb_abort_seq_gen: self-checking test of the abort sequence generator
// against the ICAP model. It checks the control waveform cycle by cycle
// (one write-mode cycle with enable, read cycles with enable, release), the
// status word read back, the done pulse and the status_valid flag, and that
// read cycles with busy high are not counted.
module tb_abort_seq_gen;
  localparam logic [31:0] STATUS = 32'hC0DE_F00D;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        start, done, ce_n, write_n, icap_busy, status_valid;
  logic [7:0]  icap_o;
  logic [31:0] status;
  logic        busy_model, force_busy;
  int checks = 0, failures = 0;

  abort_seq_gen #(.ICAP_W(8), .STATUS_BYTES(4)) dut (
    .clk, .rst, .start, .done, .ce_n, .write_n, .icap_busy, .icap_o, .status, .status_valid
  );
  icap_model #(.W(8), .DEPTH(16), .BUSY_PCT(0), .STATUS(STATUS)) u_icap (
    .clk, .ce_n, .write_n, .i(8'h00), .busy(busy_model), .o(icap_o)
  );
  assign icap_busy = busy_model || force_busy;

  task automatic expect_pins(input logic ce, input logic wr, input logic dn, input string what);
    checks++;
    if (ce_n !== ce || write_n !== wr || done !== dn) begin
      failures++;
      $display("%s: ce_n=%0b write_n=%0b done=%0b", what, ce_n, write_n, done);
    end
  endtask

  initial begin
    start = 0; force_busy = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    expect_pins(1, 1, 0, "idle");
    // run 1: no busy
    start = 1; @(posedge clk); #1; start = 0;
    expect_pins(0, 0, 0, "arm");
    for (int k = 0; k < 4; k++) begin
      @(posedge clk); #1;
      expect_pins(0, 1, 0, "read");
    end
    @(posedge clk); #1;
    expect_pins(1, 1, 1, "release");
    @(posedge clk); #1;
    expect_pins(1, 1, 0, "back to idle");
    checks++;
    if (!status_valid || status !== STATUS) begin failures++; $display("status %h valid %0b", status, status_valid); end
    checks++;
    if (u_icap.naborts != 1) begin failures++; $display("ICAP saw %0d aborts", u_icap.naborts); end
    // run 2: busy during two read cycles stretches the read phase
    start = 1; @(posedge clk); #1; start = 0;
    checks++;
    if (status_valid) begin failures++; $display("status_valid not cleared by start"); end
    expect_pins(0, 0, 0, "arm 2");
    @(posedge clk); #1; force u_icap.busy = 1'b1;
    @(posedge clk); #1;
    @(posedge clk); #1; release u_icap.busy; u_icap.busy = 1'b0;
    for (int k = 0; k < 4; k++) begin
      expect_pins(0, 1, 0, "read 2");
      @(posedge clk); #1;
    end
    expect_pins(1, 1, 1, "release 2");
    @(posedge clk); #1;
    checks++;
    if (status !== STATUS) begin failures++; $display("status after busy %h", status); end
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
