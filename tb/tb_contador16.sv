// Testbench for contador16: random S0 steps against a modulo-16 count.
module tb_contador16;
  logic       clk = 0, rstg, s0;
  logic [3:0] q;
  int checks = 0, failures = 0, model = 0;

  contador16 dut (.clk, .rstg, .s0, .q);

  always #5 clk = ~clk;

  initial begin
    rstg = 1; s0 = 0;
    @(posedge clk); #1 rstg = 0;
    for (int i = 0; i < 200; i++) begin
      s0 = 1'($urandom);
      @(posedge clk);
      if (s0) model = (model + 1) % 16;
      #1;
      checks++;
      if (q !== 4'(model)) begin
        failures++;
        $display("FAIL cycle %0d q=%0d expected %0d", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
