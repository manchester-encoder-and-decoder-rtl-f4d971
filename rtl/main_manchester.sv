// Combined Manchester encoder/decoder.
//
// The encoder (parallel word in, serial Manchester line out) and the
// clockless decoder (one two-half symbol in, data, invalid flag and recovered
// clock out) sit side by side with their own resets. The two share the
// channel in time: while the encoder converts (start high) the decoder is
// disabled, so its rclk is 00, invalid is 0 and dataout holds; while the
// encoder is idle or in reset, start and codeout are 0 and the decoder runs.
// codein is a separate input; to decode what the encoder sent, sample
// codeout in each half of each bit period and present the pairs on codein.
//
// Port names follow the document's top module. Driving the decoder enable
// with NOT start is this design's way of giving the mutual exclusion the
// document describes. Both resets are active low.
module main_manchester
  import manchester_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_WIDTH
) (
  input  logic             rst_enco,  // encoder reset, active low
  input  logic             clken,     // encoder clock enable
  input  logic             clk,       // encoder bit clock
  input  logic [WIDTH-1:0] datain,    // word to encode
  output logic             start,     // encoder converting
  output logic             codeout,   // encoded serial line
  input  logic             rst_deco,  // decoder reset, active low
  input  code_t            codein,    // symbol to decode
  output logic             invalid,   // invalid symbol flag
  output logic             dataout,   // decoded bit
  output code_t            rclk       // recovered clock
);

  manchester_encoder #(.WIDTH(WIDTH)) u_enc (
    .rst_n (rst_enco),
    .clken (clken),
    .clk   (clk),
    .din   (datain),
    .start (start),
    .dout  (codeout)
  );

  manchester_decoder u_dec (
    .rst_n   (rst_deco),
    .en      (!start),
    .code    (codein),
    .data    (dataout),
    .invalid (invalid),
    .rclk    (rclk)
  );

  // The encoder drives the line only while it converts.
  always_comb begin
    if (!start) assert (!codeout) else $error("codeout active outside a conversion");
  end

endmodule
