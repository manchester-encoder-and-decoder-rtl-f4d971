// Manchester decoder with clock recovery and invalid code detection.
//
// The input is one Manchester symbol given as its two half-bit values (first
// half in code[1]). A control unit gates the symbol with reset (active low)
// and enable; a transition detector latches the data bit from the direction
// of the mid-bit transition (01 -> 1, 10 -> 0) and holds it otherwise; a clock
// recovery unit derives rclk (01 recovered, 00 none) from the symbol and the
// recovered bit; an invalid code detector flags 00 and 11. There is no clock
// input: every output follows the input symbol combinationally, the data bit
// through a transparent latch, so the decoder works at any symbol rate.
//
// The block structure and port names follow the document. The exact gate
// level of each unit, the reset value and the gating of all outputs by
// enable are this design's choices.
module manchester_decoder
  import manchester_pkg::*;
(
  input  logic  rst_n,    // reset, active low
  input  logic  en,       // decoder enable
  input  code_t code,     // coded symbol
  output logic  data,     // recovered data
  output logic  invalid,  // 1 for a symbol with no mid-bit transition
  output code_t rclk      // recovered clock
);

  code_t cu_code;
  logic  active;

  mdec_control_unit u_cu (
    .rst_n    (rst_n),
    .en       (en),
    .code_in  (code),
    .code_out (cu_code),
    .active   (active)
  );

  mdec_invalid_detector u_inv (
    .active  (active),
    .code    (code),
    .invalid (invalid)
  );

  mdec_transition_detector u_td (
    .rst_n  (rst_n),
    .active (active),
    .code   (cu_code),
    .data   (data)
  );

  mdec_clock_recovery u_cru (
    .active  (active),
    .invalid (invalid),
    .code    (cu_code),
    .data    (data),
    .rclk    (rclk)
  );

endmodule
