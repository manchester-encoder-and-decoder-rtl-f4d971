// Transition detector test: a reference bit is updated only on 01 (to 1)
// and 10 (to 0) while active, kept on 00, 11 and while inactive, and cleared
// by reset. A fixed sequence, then 400 random steps, are compared with it.
module tb_mdec_transition_detector;
  import manchester_pkg::*;
  logic rst_n, active, data;
  code_t code;
  int checks = 0, failures = 0;
  logic ref_bit;
  int holds = 0;

  mdec_transition_detector dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic r, input logic a, input code_t c);
    rst_n = r; active = a; code = c;
    #1;
    if (!r)                          ref_bit = 1'b0;
    else if (a && c == CODE_ONE)     ref_bit = 1'b1;
    else if (a && c == CODE_ZERO)    ref_bit = 1'b0;
    else                             holds++;
    checks++;
    if (data !== ref_bit) begin failures++; $display("r=%b a=%b code=%b data=%b exp=%b", r, a, c, data, ref_bit); end
  endtask

  initial begin
    step(0, 1, CODE_ONE);
    // the figure's sequence
    step(1, 1, CODE_ONE);
    step(1, 1, CODE_LOW);
    step(1, 1, CODE_ZERO);
    step(1, 1, CODE_HIGH);
    step(1, 1, CODE_ONE);
    step(1, 0, CODE_ZERO);   // inactive: hold 1
    step(1, 1, CODE_ZERO);
    step(1, 0, CODE_ONE);    // inactive: hold 0
    repeat (400) step($urandom_range(0, 15) != 0, $urandom_range(0, 3) != 0, code_t'($urandom));
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
