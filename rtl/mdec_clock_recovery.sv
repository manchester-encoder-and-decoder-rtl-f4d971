// Clock recovery unit (CRU) of the Manchester decoder.
//
// Each half of the recovered clock is the XNOR of that half of the incoming
// symbol with the recovered data bit: for a valid symbol the first half
// always differs from the data bit and the second half equals it, so rclk is
// 01, a clock that rises in mid-bit. A symbol with no transition, or an
// inactive decoder, gives 00 (no clock). Purely combinational.
//
// The document gives the inputs (recovered data and incoming code), the XOR
// operation and the 01/00 output convention. Forcing 00 on every invalid
// symbol, rather than only on the cases the document shows, is this design's
// choice.
module mdec_clock_recovery
  import manchester_pkg::*;
(
  input  logic  active,   // decoder active
  input  logic  invalid,  // from the invalid code detector
  input  code_t code,     // gated coded symbol
  input  logic  data,     // recovered data bit
  output code_t rclk      // recovered clock, first half in bit 1
);

  code_t mixed;

  always_comb begin
    mixed = ~(code ^ {2{data}});
    rclk  = mixed & {2{active & ~invalid}};
  end

endmodule
