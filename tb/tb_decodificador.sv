// Testbench for decodificador: all eight input combinations.
module tb_decodificador;
  logic       l3, l2, l0;
  logic [3:0] en_pc, expv;
  int checks = 0, failures = 0;

  decodificador dut (.l3, .l2, .l0, .en_pc);

  initial begin
    for (int i = 0; i < 8; i++) begin
      {l3, l2, l0} = 3'(i);
      #1;
      expv = l0 ? 4'b0000 : (4'b0001 << (2 * l3 + l2));
      checks++;
      if (en_pc !== expv) begin
        failures++;
        $display("FAIL l3=%b l2=%b l0=%b en_pc=%b expected %b", l3, l2, l0, en_pc, expv);
      end
      checks++;
      if ($countones(en_pc) > 1) failures++;
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
