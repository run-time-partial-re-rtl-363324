// tb_sync_fifo: self-checking test of the FIFO against a queue model. Random
// writes (never when full) and reads (never when empty) for many clocks;
// every clock it checks empty, full, count and the first-word-fall-through
// output against the model. It also checks that clear empties the FIFO and
// that the FIFO reaches full.
module tb_sync_fifo;
  localparam int W = 64, DEPTH = 32;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic          clear, wr_en, rd_en, full, empty;
  logic [W-1:0]  wdata, rdata;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [W-1:0]  q [$];
  int checks = 0, failures = 0, nfull = 0, wr_pct, rd_pct;

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  initial begin
    clear = 0; wr_en = 0; rd_en = 0; wdata = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 4000; k++) begin
      wr_pct = (k / 500) % 2 ? 80 : 30;
      rd_pct = (k / 500) % 2 ? 30 : 80;
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == DEPTH) || int'(count) != q.size()
          || (q.size() > 0 && rdata !== q[0])) begin
        failures++;
        $display("k=%0d: empty %0b full %0b count %0d model %0d", k, empty, full, count, q.size());
      end
      if (full) nfull++;
      if (k == 3000) begin
        clear = 1;
        @(negedge clk);
        clear = 0;
        q.delete();
        checks++;
        if (!empty || count != 0) begin failures++; $display("clear failed"); end
      end
      wr_en = !full && ($urandom % 100) < wr_pct;
      rd_en = !empty && ($urandom % 100) < rd_pct;
      wdata = {$urandom, $urandom};
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wdata);
    end
    checks++;
    if (nfull == 0) begin failures++; $display("never full"); end
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
