// Serializer test: several words, each after its own reset, with random
// clk_en pauses. Every rising edge is checked against a cycle-level model:
// start must be high for exactly WIDTH enabled bit periods, bit_out must
// carry the word MSB first, and the serializer must stay idle afterwards.
module tb_manchester_serializer;
  localparam int unsigned WIDTH = 8;
  logic clk = 0, rst_n = 0, clk_en = 0;
  logic [WIDTH-1:0] din;
  logic bit_out, start;
  int checks = 0, failures = 0;

  manchester_serializer #(.WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_word(input logic [WIDTH-1:0] w, input bit pauses);
    int periods = 0;
    int k = 0;        // index of the bit expected next
    int idle_checks = 0;
    rst_n = 0; clk_en = 0; din = w;
    @(negedge clk); @(negedge clk);
    checks++; if (start !== 1'b0) begin failures++; $display("start high in reset"); end
    rst_n = 1;
    while (idle_checks < 4) begin
      clk_en = pauses ? ($urandom_range(0, 3) != 0) : 1'b1;
      @(negedge clk);
      if (clk_en) begin
        if (k < WIDTH) begin
          checks += 2;
          if (start !== 1'b1) begin failures++; $display("start low at bit %0d", k); end
          if (bit_out !== w[WIDTH-1-k]) begin failures++; $display("bit %0d wrong", k); end
          k++; periods++;
        end else begin
          checks++; idle_checks++;
          k = WIDTH + 1;  // word finished
          if (start !== 1'b0) begin failures++; $display("start high after word"); end
        end
      end else if (k > 0 && k <= WIDTH) begin
        // paused: outputs hold
        checks += 2;
        if (bit_out !== w[WIDTH-k]) begin failures++; $display("bit not held"); end
        if (start !== 1'b1) begin failures++; $display("start dropped in pause"); end
      end
    end
    checks++;
    if (periods != WIDTH) begin failures++; $display("start lasted %0d periods", periods); end
  endtask

  initial begin
    send_word(8'b1011_0010, 0);
    send_word(8'b1011_0011, 0);
    repeat (6) send_word(8'($urandom), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
