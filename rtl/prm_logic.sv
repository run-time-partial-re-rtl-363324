// prm_logic: the combinational re-configurable test module. It applies four
// logic functions to a 4-bit stimuli vector {a, b, c, d} (a = bit 3):
//   result[3] = a & b & c & d               bit-wise AND of all four
//   result[2] = ~(~a | ~b | ~c | ~d)        the same AND by De Morgan
//   result[1] = a | b | c | d               OR of all four
//   result[0] = ~(~a & ~b & ~c & ~d)        the same OR by De Morgan
// Pairs of equal outputs make a wrong configuration easy to spot on LEDs:
// bits 3 and 2 always agree, bits 1 and 0 always agree.
// The four functions and their order come from the test module's truth
// table; which stimuli bit is `a` and which result bit holds which column
// are this design's choice. Purely combinational, no clock.
module prm_logic (
  input  logic [3:0] stimuli,
  output logic [3:0] result
);
  logic a, b, c, d;
  assign {a, b, c, d} = stimuli;

  assign result[3] = a & b & c & d;
  assign result[2] = ~(~a | ~b | ~c | ~d);
  assign result[1] = a | b | c | d;
  assign result[0] = ~(~a & ~b & ~c & ~d);
endmodule
