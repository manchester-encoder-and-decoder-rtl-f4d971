// Invalid code detector of the Manchester decoder.
//
// A valid Manchester symbol always changes level in mid-bit, so a symbol
// whose two halves are equal (00 steady low, 11 steady high) is invalid:
// invalid = active & (code[1] XNOR code[0]). Purely combinational, so the
// flag follows the input symbol with no latency. The rule (high for an
// invalid input, low otherwise) follows the document; gating by 'active', so
// that a reset or disabled decoder flags nothing, is this design's choice.
module mdec_invalid_detector
  import manchester_pkg::*;
(
  input  logic  active,  // decoder active
  input  code_t code,    // coded symbol
  output logic  invalid  // 1 for 00 or 11
);

  assign invalid = active & ~(code[1] ^ code[0]);

endmodule
