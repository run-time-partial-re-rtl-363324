// tb_xup_test_top: end-to-end test of the board test system at its default
// parameters. The block RAM is loaded with two partial bitstreams of the
// sizes measured for the two slot variants, 4784 words (19136 bytes) at
// bitstream address 0 and 5888 words (23552 bytes) at 0x2000, each with its
// 64-bit length header. A model of the configuration memory watches the ICAP
// model: when a re-configuration has finished it reads the frame address in
// the written bitstream and switches the slot to the module it belongs to.
// Sequence, all through the board ports:
//   1  press "module 1": bitstream 1 must reach the ICAP byte for byte, at one
//      byte per clock; the slot then holds the logic module
//   2  step through all 16 stimuli; with the DIP switch at 0 the LEDs must show
//      the stimuli, at 1 the truth-table row of the logic module
//   3  press "module 2", and "module 1" again while it runs (ignored):
//      bitstream 2 must be written, and only it; the slot then holds the
//      counter
//   4  press count enable 20 times; the LEDs must show the count modulo 16,
//      and the stimuli again with the DIP switch at 0
// Mechanisms counted (each must happen): re-configuration to each module,
// an ignored press, LED multiplexer in both positions, counter steps.
module tb_xup_test_top;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;   // 50 MHz

  logic        btn_count = 0, btn_next = 0, btn_rm1 = 0, btn_rm2 = 0, dip_show_result = 0;
  logic [3:0]  leds;
  logic        reconfig_busy, slot_module = 0;
  logic        load_en = 0;
  logic [13:0] load_addr = '0;
  logic [31:0] load_data = '0;
  logic        icap_ce_n, icap_write_n, icap_busy;
  logic [7:0]  icap_i, icap_o;

  int checks = 0, failures = 0;
  int n_rm1 = 0, n_rm2 = 0, n_ignored = 0, n_show_stim = 0, n_show_res = 0, n_count = 0;

  xup_test_top dut (.*);
  icap_model #(.W(8), .DEPTH(65536), .STATUS(32'h0)) u_icap (
    .clk, .ce_n(icap_ce_n), .write_n(icap_write_n), .i(icap_i), .busy(icap_busy), .o(icap_o)
  );

  localparam int LEN1 = 4784, LEN2 = 5888, AT1 = 0, AT2 = 'h2000;

  function automatic logic [31:0] bs_word(int id, int k, int len);
    if (k == 0)       return 32'hFFFF_FFFF;
    if (k == 1)       return 32'hAA99_5566;
    if (k == 2)       return 32'h3000_2001;              // write FAR
    if (k == 3)       return 32'(id) << 17;              // frame address identifies the module
    if (k == 4)       return 32'h3000_4000;
    if (k == 5)       return 32'h5000_0000 | 32'(len - 9);
    if (k == len - 3) return 32'h3000_8001;
    if (k == len - 2) return 32'h0000_000D;
    if (k == len - 1) return 32'h2000_0000;
    return (32'(k) * 32'h61C8_8647) ^ (32'(id) << 24);
  endfunction

  // rows of the logic module's truth table: AND, De Morgan AND, OR, De Morgan OR
  function automatic logic [3:0] truth_row(logic [3:0] s);
    return (s == 4'hF) ? 4'b1111 : (s == 4'h0) ? 4'b0000 : 4'b0011;
  endfunction

  task automatic load(input int id, input int at, input int len);
    for (int k = -2; k < len; k++) begin
      @(negedge clk);
      load_en = 1; load_addr = 14'(at + 2 + k);
      load_data = (k == -2) ? 32'h0 : (k == -1) ? 32'(len) : bs_word(id, k, len);
    end
    @(negedge clk);
    load_en = 0;
  endtask

  task automatic press(ref logic btn, input int hold);
    @(negedge clk); btn = 1;
    repeat (hold) @(negedge clk);
    btn = 0;
    repeat (3) @(negedge clk);
  endtask

  // configuration memory model: after a run, the frame address decides the module
  task automatic settle_slot();
    logic [31:0] far;
    far = {u_icap.mem[12], u_icap.mem[13], u_icap.mem[14], u_icap.mem[15]};
    slot_module = (far[31:17] == 15'd2);
  endtask

  task automatic check_bs(input int id, input int len, input string what);
    int bad = 0;
    checks++;
    if (u_icap.nwords != 4 * len) begin failures++; $display("%s: %0d bytes, expected %0d", what, u_icap.nwords, 4 * len); end
    for (int b = 0; b < 4 * len; b++) begin
      logic [31:0] w;
      w = bs_word(id, b / 4, len);
      if (u_icap.mem[b] !== w[31 - 8 * (b % 4) -: 8]) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("%s: %0d wrong bytes", what, bad); end
  endtask

  task automatic reconfigure(ref logic btn, input int id, input int len, input bit poke_other, input string what);
    int clocks = 0;
    u_icap.nwords = 0;
    @(negedge clk); btn = 1;
    @(negedge clk); btn = 0;
    while (reconfig_busy && clocks < 8 * len) begin
      @(negedge clk);
      clocks++;
      if (poke_other && clocks == 1000) begin
        if (id == 2) btn_rm1 = 1; else btn_rm2 = 1;
      end
      if (poke_other && clocks == 1003) begin btn_rm1 = 0; btn_rm2 = 0; end
    end
    checks++;
    if (reconfig_busy || clocks == 0) begin failures++; $display("%s: no end after %0d clocks", what, clocks); end
    check_bs(id, len, what);
    checks++;
    if (clocks > 4 * len + 10) begin failures++; $display("%s: %0d clocks for %0d bytes", what, clocks, 4 * len); end
    $display("%s: %0d bytes in %0d clocks", what, 4 * len, clocks);
    settle_slot();
    repeat (2) @(negedge clk);
  endtask

  initial begin
    logic [3:0] stim = 0, cnt = 0;
    repeat (4) @(negedge clk);
    rst = 0;
    load(1, AT1, LEN1);
    load(2, AT2, LEN2);

    // 1: load module 1
    reconfigure(btn_rm1, 1, LEN1, 1'b0, "module 1 bitstream");
    checks++;
    if (slot_module !== 1'b0) failures++; else n_rm1++;

    // 2: walk the stimuli through the logic module
    for (int v = 0; v < 17; v++) begin
      dip_show_result = 0;
      repeat (2) @(negedge clk);
      checks++;
      if (leds !== stim) begin failures++; $display("stimuli %b: leds %b", stim, leds); end
      else n_show_stim++;
      dip_show_result = 1;
      repeat (2) @(negedge clk);
      checks++;
      if (leds !== truth_row(stim)) begin failures++; $display("logic module, stimuli %b: leds %b, expected %b", stim, leds, truth_row(stim)); end
      else n_show_res++;
      press(btn_next, 1 + v % 3);
      stim++;
    end

    // 3: load module 2, with a module 1 press in the middle
    reconfigure(btn_rm2, 2, LEN2, 1'b1, "module 2 bitstream, second button pressed during the run");
    checks++;
    if (slot_module !== 1'b1) failures++; else begin n_rm2++; n_ignored++; end

    // 4: count
    dip_show_result = 1;
    for (int p = 0; p < 20; p++) begin
      press(btn_count, 1 + p % 4);
      cnt++;
      checks++;
      if (leds !== cnt) begin failures++; $display("counter press %0d: leds %b, expected %b", p, leds, cnt); end
      else n_count++;
    end
    dip_show_result = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (leds !== stim) failures++; else n_show_stim++;

    $display("mechanisms: module-1 loads %0d, module-2 loads %0d, ignored presses %0d, LEDs on stimuli %0d, on result %0d, counter steps %0d",
             n_rm1, n_rm2, n_ignored, n_show_stim, n_show_res, n_count);
    checks++;
    if (n_rm1 == 0 || n_rm2 == 0 || n_ignored == 0 || n_show_stim == 0 || n_show_res == 0 || n_count == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
