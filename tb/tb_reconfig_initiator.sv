// tb_reconfig_initiator: presses the module 1 and module 2 buttons and checks
// the request the initiator sends: one clock of start_op with set, and
// mc_address of the chosen bitstream. A simple responder answers each
// request with end_op after a random delay; presses during that time must
// not produce a request, and a press after end_op must. Also checks that
// module 1 wins when both buttons rise together.
module tb_reconfig_initiator;
  localparam logic [23:0] A1 = 24'h00_0040, A2 = 24'h80_1234;
  logic clk = 0, rst = 1, btn_rm1 = 0, btn_rm2 = 0, end_op = 0;
  logic start_op, set, busy;
  logic [23:0] mc_address;
  int checks = 0, failures = 0;
  int nreq = 0, delay = 0;
  logic [23:0] last_addr;

  always #5 clk = ~clk;
  reconfig_initiator #(.ADDR_W(24), .BS1_ADDR(A1), .BS2_ADDR(A2)) dut (.*);

  // responder: end_op a random time after each request
  always @(posedge clk) begin
    end_op <= 1'b0;
    if (start_op) begin
      nreq++;
      last_addr = mc_address;
      if (!set) begin failures++; $display("start_op without set"); end
      delay = 5 + $urandom % 30;
    end else if (delay > 0) begin
      delay--;
      if (delay == 0) end_op <= 1'b1;
    end
  end

  task automatic press(input bit which2, input int hold);
    @(negedge clk);
    if (which2) btn_rm2 = 1; else btn_rm1 = 1;
    repeat (hold) @(negedge clk);
    btn_rm1 = 0; btn_rm2 = 0;
    @(negedge clk);
  endtask

  initial begin
    int n0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 30; k++) begin
      bit w;
      w  = 1'($urandom);
      n0 = nreq;
      press(w, 1 + $urandom % 4);
      checks++;
      if (nreq != n0 + 1 || last_addr !== (w ? A2 : A1) || !busy) begin
        failures++; $display("press %0d: requests %0d, address %h, busy %0b", k, nreq - n0, last_addr, busy);
      end
      // press again while the run is pending: ignored
      press(!w, 1);
      checks++;
      if (nreq != n0 + 1) begin failures++; $display("press while busy was not ignored"); end
      while (busy) @(negedge clk);
    end
    // both buttons together
    n0 = nreq;
    @(negedge clk); btn_rm1 = 1; btn_rm2 = 1;
    @(negedge clk); @(negedge clk); btn_rm1 = 0; btn_rm2 = 0;
    checks++;
    if (nreq != n0 + 1 || last_addr !== A1) failures++;
    while (busy) @(negedge clk);
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
