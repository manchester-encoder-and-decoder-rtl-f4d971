// Exhaustive test of the decoder control unit: for every reset, enable and
// symbol value, 'active' must be high only out of reset and enabled, and the
// symbol must pass unchanged when active and read 00 otherwise.
module tb_mdec_control_unit;
  import manchester_pkg::*;
  logic rst_n, en, active;
  code_t code_in, code_out;
  int checks = 0, failures = 0;

  mdec_control_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {rst_n, en, code_in} = 4'(v);
      #1;
      checks += 2;
      if (rst_n == 1'b1 && en == 1'b1) begin
        if (active !== 1'b1 || code_out !== code_in) begin failures++; $display("v=%0d not passed", v); end
      end else begin
        if (active !== 1'b0 || code_out !== 2'b00) begin failures++; $display("v=%0d not blocked", v); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
