// Four-gate Manchester encoder core.
//
// The encoded line is the bit clock XOR the data bit, so a bit period whose
// clock is high in its first half gives 10 (fall) for a 0 and 01 (rise) for a
// 1. Gate 1 (AND) gates the clock with clk_en, gate 2 (XOR) mixes the gated
// clock with the data bit, gate 3 (AND) applies the encoder enable and gate 4
// (AND) the reset, which is therefore active low: enc_rst = 0 forces the line
// low. The gate chain and its signal names follow the document; it is purely
// combinational, so code_dat follows every clock edge and every data change
// with no latency.
//
// The clock is used as data here on purpose: that is how the encoder works.
// A synthesis flow must treat clk -> code_dat as a clock-to-output path.
module manchester_enc_gates (
  input  logic clk,      // bit clock
  input  logic clk_en,   // clock gate enable
  input  logic data_in,  // serial NRZ data, changes on the rising clock edge
  input  logic enc_en,   // encoder enable
  input  logic enc_rst,  // reset, active low
  output logic code_out, // XOR output, before enable and reset gating
  output logic code_dat  // Manchester line output
);

  logic gated_clk;  // gate 1
  logic enabled;    // gate 3

  always_comb begin
    gated_clk = clk & clk_en;
    code_out  = gated_clk ^ data_in;
    enabled   = code_out & enc_en;
    code_dat  = enabled & enc_rst;
  end

endmodule
