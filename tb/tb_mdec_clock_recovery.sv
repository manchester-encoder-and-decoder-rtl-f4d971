// Exhaustive test of the clock recovery unit. The expected value comes from
// the meaning of the output, not its gates: 01 whenever the decoder is active,
// the symbol is valid and the data bit matches it (a one for 01, a zero for
// 10), 00 for an invalid or inactive symbol. The remaining combinations
// (valid symbol with a stale data bit) are checked against the half-by-half
// comparison of symbol and data bit.
module tb_mdec_clock_recovery;
  import manchester_pkg::*;
  logic active, invalid, data;
  code_t code, rclk;
  int checks = 0, failures = 0;

  mdec_clock_recovery dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    code_t exp;
    for (int v = 0; v < 32; v++) begin
      {active, invalid, data, code} = 5'(v);
      #1;
      if (!active || invalid) exp = RCLK_NONE;
      else if ((code == CODE_ONE && data) || (code == CODE_ZERO && !data)) exp = RCLK_OK;
      else begin
        exp[1] = (code[1] == data);
        exp[0] = (code[0] == data);
      end
      checks++;
      if (rclk !== exp) begin failures++; $display("v=%0d rclk=%b exp=%b", v, rclk, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
