// Manchester encoder for a WIDTH-bit parallel word.
//
// A serializer turns din into one bit per clock period, MSB first, and raises
// start for the WIDTH bit periods of the word; the four-gate core then
// produces dout = ((clk & clken) ^ bit) & start & rst_n. With a clock that is
// high in the first half of each period, a 1 is sent as low-then-high and a 0
// as high-then-low. Conversion begins at the first enabled rising edge after
// rst_n goes high and dout is 0 outside it. With a clock of another duty cycle
// the two halves of each symbol take the clock's high and low times.
//
// Port names and the 8-bit width follow the document; the serializer details
// (bit order, one word per reset, start driving the encoder enable) are this
// design's choices.
module manchester_encoder #(
  parameter int unsigned WIDTH = manchester_pkg::DATA_WIDTH
) (
  input  logic             rst_n,  // reset, active low
  input  logic             clken,  // clock enable
  input  logic             clk,    // bit clock
  input  logic [WIDTH-1:0] din,    // parallel word
  output logic             start,  // high while converting
  output logic             dout    // Manchester output
);

  logic ser_bit;

  manchester_serializer #(.WIDTH(WIDTH)) u_ser (
    .clk     (clk),
    .rst_n   (rst_n),
    .clk_en  (clken),
    .din     (din),
    .bit_out (ser_bit),
    .start   (start)
  );

  manchester_enc_gates u_gates (
    .clk      (clk),
    .clk_en   (clken),
    .data_in  (ser_bit),
    .enc_en   (start),
    .enc_rst  (rst_n),
    .code_out (),
    .code_dat (dout)
  );

endmodule
