// Testbench for ttl_latch: random enables and data against a held copy.
module tb_ttl_latch;
  logic       clk = 0, rst, s6;
  logic [1:0] nb_in, nb, model;
  int checks = 0, failures = 0;

  ttl_latch dut (.clk, .rst, .s6, .nb_in, .nb);

  always #5 clk = ~clk;

  initial begin
    rst = 1; s6 = 0; nb_in = 0; model = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 300; i++) begin
      s6 = 1'($urandom); nb_in = 2'($urandom); rst = ($urandom % 20) == 0;
      @(posedge clk);
      if (rst) model = 0; else if (s6) model = nb_in;
      #1;
      checks++;
      if (nb !== model) begin
        failures++;
        $display("FAIL cycle %0d nb=%b expected %b", i, nb, model);
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
