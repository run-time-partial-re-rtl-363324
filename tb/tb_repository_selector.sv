// tb_repository_selector: self-checking test of the repository selector with
// two repositories whose outputs the testbench drives with distinct values.
// For each start it checks the one-cycle repository_select pulse to the
// repository named by the address's top bit, that valid, data, length and
// length_valid come from that repository afterwards, and that the acknowledge
// reaches it alone. The choice must hold until the next start.
module tb_repository_selector;
  localparam int NREP = 2, ADDR_W = 24;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic                start, valid, ack, length_valid;
  logic [ADDR_W-1:0]   address;
  logic [NREP-1:0]     rep_select, rep_valid, rep_ack, rep_length_valid;
  logic [31:0]         rep_data [NREP];
  logic [31:0]         rep_length [NREP];
  logic [31:0]         data, length;
  int checks = 0, failures = 0;

  repository_selector #(.NREP(NREP), .ADDR_W(ADDR_W), .W(32), .LEN_W(32)) dut (.*);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic select_and_check(input int r);
    address = {1'(r), 23'(r * 1000 + 5)};
    start = 1;
    #1;
    check(rep_select == NREP'(1 << r), $sformatf("select pulse for %0d: %b", r, rep_select));
    @(posedge clk); #1;
    start = 0;
    #1;
    check(rep_select == '0, "select is a single pulse");
    for (int k = 0; k < 20; k++) begin
      rep_valid        = NREP'($urandom);
      rep_length_valid = NREP'($urandom);
      ack              = 1'($urandom);
      for (int q = 0; q < NREP; q++) begin
        rep_data[q]   = $urandom;
        rep_length[q] = $urandom;
      end
      address = ADDR_W'($urandom);   // must not matter between starts
      #1;
      check(valid == rep_valid[r] && data == rep_data[r] && length == rep_length[r]
            && length_valid == rep_length_valid[r], $sformatf("mux from %0d", r));
      check(rep_ack == (ack ? NREP'(1 << r) : '0), $sformatf("ack to %0d: %b", r, rep_ack));
      @(posedge clk); #1;
    end
  endtask

  initial begin
    start = 0; ack = 0; address = '0; rep_valid = '0; rep_length_valid = '0;
    for (int q = 0; q < NREP; q++) begin rep_data[q] = '0; rep_length[q] = '0; end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    select_and_check(1);
    select_and_check(0);
    select_and_check(1);
    select_and_check(1);
    select_and_check(0);
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
