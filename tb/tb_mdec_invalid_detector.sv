// Exhaustive test of the invalid code detector against the symbol table:
// 00 and 11 are invalid, 01 and 10 valid; nothing is flagged when inactive.
module tb_mdec_invalid_detector;
  import manchester_pkg::*;
  logic active, invalid;
  code_t code;
  int checks = 0, failures = 0;

  mdec_invalid_detector dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int v = 0; v < 8; v++) begin
      {active, code} = 3'(v);
      #1;
      case (code)
        CODE_LOW, CODE_HIGH: exp = active;
        default:             exp = 1'b0;
      endcase
      checks++;
      if (invalid !== exp) begin failures++; $display("active=%b code=%b invalid=%b", active, code, invalid); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
