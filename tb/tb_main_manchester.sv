// End-to-end test of the combined encoder/decoder at its default size.
//
// For each word: the encoder is reset, then converts the word while the
// testbench samples codeout in the middle of each clock high and low time,
// giving one two-half symbol per bit. During the conversion a valid symbol is
// also held on codein to show that the decoder is disabled (rclk 00, no
// invalid flag, dataout held). Then the encoder is held in reset (start and
// codeout must read 0) and the captured symbols are played into the decoder;
// dataout must rebuild the word MSB first with rclk 01 on every bit. Invalid
// symbols (00, 11) are mixed in between bits and must raise invalid, give
// rclk 00 and leave dataout unchanged. Words run with a 50% and a 25% duty
// cycle clock and with clken pauses. Finally the decoder symbol sequence
// 01, 00, 10, 11 is checked against its known recovered clock 01, 00, 01, 00.
// Each mechanism is counted and one that never happened counts as a failure.
module tb_main_manchester;
  import manchester_pkg::*;
  localparam int unsigned WIDTH = DATA_WIDTH;

  logic rst_enco = 0, clken = 0, clk = 0, rst_deco = 0;
  logic [WIDTH-1:0] datain = '0;
  code_t codein = CODE_LOW;
  logic start, codeout, invalid, dataout;
  code_t rclk;

  int checks = 0, failures = 0;
  int t_high = 5, t_low = 5;
  int n_words = 0, n_dec_blocked = 0, n_rclk_ok = 0, n_invalid = 0, n_hold = 0;
  int n_duty25 = 0, n_pause = 0, n_enc_quiet = 0;

  main_manchester dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic period(output logic s_hi, output logic s_lo, output logic st);
    clk = 1;
    #(t_high / 2.0);
    s_hi = codeout; st = start;
    #(t_high / 2.0);
    clk = 0;
    #(t_low / 2.0);
    s_lo = codeout;
    #(t_low / 2.0);
  endtask

  task automatic run_word(input logic [WIDTH-1:0] w, input bit pauses);
    code_t sym [WIDTH];
    logic hi, lo, st, held;
    int k = 0, n_start = 0, guard = 0;

    // --- encode ---
    rst_enco = 0; clken = 0; datain = w;
    rst_deco = 1;
    codein = CODE_LOW;   // invalid: an enabled decoder keeps its bit
    period(hi, lo, st);
    held = dataout;
    rst_enco = 1;
    while (k < WIDTH && guard < 4 * WIDTH) begin
      guard++;
      clken = pauses ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (!clken) begin
        // paused: no clock edge reaches the encoder, the bit waits
        #(t_high + t_low);
        n_pause++;
        continue;
      end
      period(hi, lo, st);
      if (st) begin
        n_start++;
        sym[k] = {hi, lo};
        chk(sym[k] == (w[WIDTH-1-k] ? CODE_ONE : CODE_ZERO), "encoded symbol");
        // decoder must be disabled during the conversion
        chk(rclk == RCLK_NONE && !invalid && dataout == held, "decoder disabled while encoding");
        n_dec_blocked++;
        k++;
        // from now on offer the decoder a symbol that would flip its bit
        codein = held ? CODE_ZERO : CODE_ONE;
      end
    end
    clken = 1;
    period(hi, lo, st);
    chk(!st && !hi && !lo, "start falls after the word");
    chk(n_start == WIDTH, "start lasts WIDTH bit periods");
    if (t_high != t_low) n_duty25++;

    // --- decode: encoder held in reset ---
    rst_enco = 0;
    #1;
    chk(!start && !codeout, "encoder quiet in reset");
    n_enc_quiet++;
    for (int i = 0; i < WIDTH; i++) begin
      codein = sym[i];
      #2;
      chk(dataout == w[WIDTH-1-i], "decoded bit");
      chk(rclk == RCLK_OK && !invalid, "clock recovered");
      n_rclk_ok++;
      if ($urandom_range(0, 2) == 0) begin
        codein = $urandom_range(0, 1) ? CODE_HIGH : CODE_LOW;
        #2;
        chk(invalid && rclk == RCLK_NONE, "invalid symbol flagged");
        chk(dataout == w[WIDTH-1-i], "data held on invalid symbol");
        n_invalid++; n_hold++;
      end
    end
    n_words++;
  endtask

  initial begin
    // decoder reset clears the data bit
    rst_deco = 0; codein = CODE_ONE;
    #1;
    chk(!dataout && !invalid && rclk == RCLK_NONE, "decoder quiet in reset");

    t_high = 5; t_low = 5;
    run_word(8'b1011_0010, 0);
    run_word(8'b1001_1010, 0);
    repeat (4) run_word(WIDTH'($urandom), 1);
    t_high = 2; t_low = 6;
    run_word(8'b1011_0011, 0);
    repeat (4) run_word(WIDTH'($urandom), 1);

    // decoder symbol sequence of the combined module's reference run:
    // codein 01, 00, 10, 11 must give rclk 01, 00, 01, 00
    rst_enco = 0; rst_deco = 1;
    begin
      code_t cseq [4] = '{2'b01, 2'b00, 2'b10, 2'b11};
      code_t rseq [4] = '{2'b01, 2'b00, 2'b01, 2'b00};
      logic  dseq [4] = '{1'b1, 1'b1, 1'b0, 1'b0};
      foreach (cseq[i]) begin
        codein = cseq[i];
        #2;
        chk(rclk == rseq[i] && dataout == dseq[i] && invalid == (rseq[i] == RCLK_NONE),
            "reference decoder sequence");
        chk(!start && !codeout, "encoder outputs zero while decoding");
      end
    end

    $display("words=%0d dec_blocked=%0d rclk_ok=%0d invalid=%0d hold=%0d duty25=%0d pauses=%0d enc_quiet=%0d",
             n_words, n_dec_blocked, n_rclk_ok, n_invalid, n_hold, n_duty25, n_pause, n_enc_quiet);
    chk(n_words > 0, "a word was sent");
    chk(n_dec_blocked > 0, "decoder was disabled by the encoder");
    chk(n_rclk_ok > 0, "a clock was recovered");
    chk(n_invalid > 0, "an invalid symbol was seen");
    chk(n_hold > 0, "the data bit was held");
    chk(n_duty25 > 0, "a 25% duty clock was used");
    chk(n_pause > 0, "clken paused the encoder");
    chk(n_enc_quiet > 0, "encoder outputs were zero while decoding");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
