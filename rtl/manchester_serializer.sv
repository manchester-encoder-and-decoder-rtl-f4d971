// Parallel-to-serial converter in front of the Manchester encoder gates.
//
// After reset is released, the first rising clock edge with clk_en high
// samples din and raises start; bit_out then carries din[WIDTH-1] first and
// moves to the next lower bit on every enabled rising edge. After WIDTH bit
// periods start falls and the converter stays idle until the next reset, so
// one reset sends one word. Bits change on the rising edge because the
// encoder gates need the clock high in the first half of a bit period.
//
// The document gives the function (an 8-bit parallel word is serialized and
// a start output is high while converting, low after). MSB-first order,
// one word per reset, active-low asynchronous reset and the use of clk_en as
// an advance enable are this design's choices.
module manchester_serializer #(
  parameter int unsigned WIDTH = manchester_pkg::DATA_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,   // asynchronous reset, active low
  input  logic             clk_en,  // advance enable
  input  logic [WIDTH-1:0] din,     // word to send
  output logic             bit_out, // current serial bit
  output logic             start    // high for the WIDTH bit periods of a word
);

  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] shreg;
  logic [CW-1:0]    sent;   // bit periods begun since reset
  logic             done;

  assign done = (sent == CW'(WIDTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      sent  <= '0;
      start <= 1'b0;
    end else if (clk_en) begin
      if (!start && !done) begin
        shreg <= din;
        sent  <= CW'(1);
        start <= 1'b1;
      end else if (start) begin
        if (done) begin
          start <= 1'b0;
        end else begin
          shreg <= shreg << 1;
          sent  <= sent + CW'(1);
        end
      end
    end
  end

  assign bit_out = shreg[WIDTH-1];

endmodule
