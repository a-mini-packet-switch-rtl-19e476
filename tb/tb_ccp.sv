// Testbench for ccp: all four input combinations against the truth table.
module tb_ccp;
  logic en, nb, set_n, reset_n;
  int checks = 0, failures = 0;

  ccp dut (.en, .nb, .set_n, .reset_n);

  // Expected {set_n, reset_n} indexed by {en, nb}.
  logic [1:0] exp_tab [4] = '{2'b11, 2'b11, 2'b10, 2'b01};

  initial begin
    for (int i = 0; i < 4; i++) begin
      {en, nb} = 2'(i);
      #1;
      checks++;
      if ({set_n, reset_n} !== exp_tab[i]) begin
        failures++;
        $display("FAIL en=%b nb=%b got set_n=%b reset_n=%b", en, nb, set_n, reset_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
