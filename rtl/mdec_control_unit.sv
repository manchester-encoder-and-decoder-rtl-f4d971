// Control unit of the Manchester decoder.
//
// Combines the reset (active low) and the enable into one 'active' signal and
// passes the coded symbol on only while the decoder is active; otherwise the
// units behind it see 00 and are told they are inactive. Purely
// combinational. The document says only that this unit holds the gates for
// the reset and enable controls; AND gating and the reset polarity are this
// design's choices.
module mdec_control_unit
  import manchester_pkg::*;
(
  input  logic  rst_n,    // reset, active low
  input  logic  en,       // decoder enable
  input  code_t code_in,  // coded symbol, first half in bit 1
  output code_t code_out, // gated symbol
  output logic  active    // rst_n & en
);

  always_comb begin
    active   = rst_n & en;
    code_out = code_in & {2{active}};
  end

endmodule
