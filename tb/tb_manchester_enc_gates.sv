// Exhaustive test of the four-gate encoder core: all 32 input combinations,
// each compared with the encoding rule written out as a case table
// (reset or disable -> 0, gated clock high -> inverted data, else data).
module tb_manchester_enc_gates;
  logic clk, clk_en, data_in, enc_en, enc_rst, code_out, code_dat;
  int checks = 0, failures = 0;

  manchester_enc_gates dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_raw, exp_dat;
    for (int v = 0; v < 32; v++) begin
      {clk, clk_en, data_in, enc_en, enc_rst} = 5'(v);
      #1;
      if (clk && clk_en) exp_raw = !data_in;
      else               exp_raw = data_in;
      exp_dat = (enc_en && enc_rst) ? exp_raw : 1'b0;
      checks += 2;
      if (code_out !== exp_raw) begin failures++; $display("code_out mismatch v=%0d", v); end
      if (code_dat !== exp_dat) begin failures++; $display("code_dat mismatch v=%0d", v); end
    end
    // Table 1: clock high then low, data 0 -> 10, data 1 -> 01
    enc_en = 1; enc_rst = 1; clk_en = 1;
    foreach (tbl[i]) begin
      data_in = tbl[i];
      clk = 1; #1; checks++; if (code_dat !== !tbl[i]) failures++;
      clk = 0; #1; checks++; if (code_dat !==  tbl[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic tbl [5] = '{1'b0, 1'b1, 1'b1, 1'b0, 1'b1};
endmodule
