// Encoder test with the two clock shapes of interest: 50% duty cycle and
// 25% duty cycle. For each word the line is sampled in the middle of every
// clock high time and every clock low time. During the WIDTH bit periods of
// a conversion the high time must carry the inverted bit and the low time the
// bit (MSB first), i.e. 10 for a 0 and 01 for a 1; outside it start and dout
// must be 0. The sampled halves are also decoded back and compared with the
// word, and the length of start is counted in clock periods.
module tb_manchester_encoder;
  localparam int unsigned WIDTH = 8;
  logic rst_n = 0, clken = 0, clk = 0;
  logic [WIDTH-1:0] din = '0;
  logic start, dout;
  int checks = 0, failures = 0;
  int t_high = 5, t_low = 5;

  manchester_encoder #(.WIDTH(WIDTH)) dut (.*);

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one clock period: high first, then low; samples in the middle of each
  task automatic period(output logic s_hi, output logic s_lo, output logic st);
    clk = 1;
    #(t_high / 2.0);
    s_hi = dout; st = start;
    #(t_high / 2.0);
    clk = 0;
    #(t_low / 2.0);
    s_lo = dout;
    #(t_low / 2.0);
  endtask

  task automatic run_word(input logic [WIDTH-1:0] w);
    logic hi, lo, st;
    logic [WIDTH-1:0] got = '0;
    int n_start = 0;
    int k = 0;
    rst_n = 0; clken = 0; din = w;
    period(hi, lo, st);
    checks += 3;
    if (st !== 0 || hi !== 0 || lo !== 0) begin failures++; $display("active in reset"); end
    rst_n = 1; clken = 1;
    for (int p = 0; p < WIDTH + 4; p++) begin
      period(hi, lo, st);
      if (st) begin
        n_start++;
        checks += 2;
        if (k < WIDTH) begin
          if (hi !== !w[WIDTH-1-k]) begin failures++; $display("bit %0d first half", k); end
          if (lo !==  w[WIDTH-1-k]) begin failures++; $display("bit %0d second half", k); end
          // decode the symbol: rise is 1, fall is 0
          if ({hi, lo} == 2'b01) got[WIDTH-1-k] = 1'b1;
          else if ({hi, lo} == 2'b10) got[WIDTH-1-k] = 1'b0;
        end
        k++;
      end else begin
        checks += 2;
        if (hi !== 0 || lo !== 0) begin failures++; $display("dout active outside conversion"); end
        if (p > 0 && k == 0) begin failures++; $display("conversion did not begin at once"); end
      end
    end
    checks += 2;
    if (n_start != WIDTH) begin failures++; $display("start lasted %0d periods", n_start); end
    if (got !== w) begin failures++; $display("decoded %b, sent %b", got, w); end
  endtask

  initial begin
    // 50% duty cycle clock
    t_high = 5; t_low = 5;
    run_word(8'b1011_0010);
    run_word(8'b1011_0011);
    repeat (4) run_word(8'($urandom));
    // 25% duty cycle clock
    t_high = 2; t_low = 6;
    run_word(8'b1011_0011);
    run_word(8'b1011_0010);
    repeat (4) run_word(8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
