// Decoder test. First the symbol sequence 01, 00, 10, 11, 01 with its known
// results (data 1,1,0,0,1; invalid 0,1,0,1,0; rclk 01,00,01,00,01). Then
// random symbols, resets and enables against a reference model of the
// decoder's rules: data follows 01/10 and holds otherwise, invalid marks
// 00/11, rclk is 01 for a valid symbol and 00 otherwise, all quiet when
// disabled or in reset. The decoder has no clock, so every output is checked
// 1 ns after its input changes.
module tb_manchester_decoder;
  import manchester_pkg::*;
  logic rst_n, en, data, invalid;
  code_t code, rclk;
  int checks = 0, failures = 0;
  logic  ref_data;

  manchester_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic d, input logic inv, input code_t rc);
    checks += 3;
    if (data !== d)      begin failures++; $display("code=%b data=%b exp=%b", code, data, d); end
    if (invalid !== inv) begin failures++; $display("code=%b invalid=%b exp=%b", code, invalid, inv); end
    if (rclk !== rc)     begin failures++; $display("code=%b rclk=%b exp=%b", code, rclk, rc); end
  endtask

  task automatic model_step(input logic r, input logic e, input code_t c);
    logic act, valid;
    rst_n = r; en = e; code = c;
    #1;
    act   = r && e;
    valid = (c == CODE_ONE) || (c == CODE_ZERO);
    if (!r) ref_data = 1'b0;
    else if (act && valid) ref_data = (c == CODE_ONE);
    check(ref_data, act && !valid, (act && valid) ? RCLK_OK : RCLK_NONE);
  endtask

  initial begin
    code_t seq [5]  = '{2'b01, 2'b00, 2'b10, 2'b11, 2'b01};
    logic  d_e [5]  = '{1'b1, 1'b1, 1'b0, 1'b0, 1'b1};
    logic  i_e [5]  = '{1'b0, 1'b1, 1'b0, 1'b1, 1'b0};
    code_t r_e [5]  = '{2'b01, 2'b00, 2'b01, 2'b00, 2'b01};
    rst_n = 0; en = 1; code = 2'b01;
    #1;
    check(1'b0, 1'b0, 2'b00);
    rst_n = 1;
    foreach (seq[i]) begin
      code = seq[i];
      #1;
      check(d_e[i], i_e[i], r_e[i]);
    end
    ref_data = 1'b1;
    repeat (500) model_step($urandom_range(0, 15) != 0, $urandom_range(0, 3) != 0, code_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
