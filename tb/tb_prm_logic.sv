// tb_prm_logic: exhaustive test of the combinational test module against its
// truth table, written out row by row below (stimuli abcd -> four result
// columns AND, De Morgan AND, OR, De Morgan OR). All 16 rows are applied and
// compared; each row is also checked for the pairwise agreement of the
// equivalent columns.
module tb_prm_logic;
  logic [3:0] stimuli, result;
  int checks = 0, failures = 0;

  prm_logic dut (.*);

  // expected result per row, columns in order from bit 3 to bit 0
  logic [3:0] table_rows [16] = '{
    4'b0000, 4'b0011, 4'b0011, 4'b0011, 4'b0011, 4'b0011, 4'b0011, 4'b0011,
    4'b0011, 4'b0011, 4'b0011, 4'b0011, 4'b0011, 4'b0011, 4'b0011, 4'b1111
  };

  initial begin
    for (int r = 0; r < 16; r++) begin
      stimuli = 4'(r);
      #1;
      checks++;
      if (result !== table_rows[r]) begin
        failures++; $display("row %b: result %b, expected %b", stimuli, result, table_rows[r]);
      end
      checks++;
      if (result[3] !== result[2] || result[1] !== result[0]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
