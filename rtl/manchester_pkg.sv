// Shared types and constants of the Manchester encoder/decoder.
//
// A Manchester symbol is written as two half-bit values, first half in bit 1
// and second half in bit 0. A rise in mid-bit (01) carries a one and a fall
// (10) carries a zero; 00 and 11 have no mid-bit transition and are invalid.
// The recovered clock uses the same two-half notation: 01 means a clock was
// recovered for the bit, 00 means none was. These encodings follow the
// document; the package itself is this design's packaging of them.
package manchester_pkg;

  typedef logic [1:0] code_t;

  localparam code_t CODE_ONE    = 2'b01;  // low-to-high: data 1
  localparam code_t CODE_ZERO   = 2'b10;  // high-to-low: data 0
  localparam code_t CODE_LOW    = 2'b00;  // steady low: invalid
  localparam code_t CODE_HIGH   = 2'b11;  // steady high: invalid

  localparam code_t RCLK_OK     = 2'b01;  // clock recovered
  localparam code_t RCLK_NONE   = 2'b00;  // no clock recovered

  localparam int unsigned DATA_WIDTH = 8; // word width of the encoder

endpackage
