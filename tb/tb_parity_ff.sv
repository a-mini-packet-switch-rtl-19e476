// Testbench for parity_ff: random loads of the parity bit against a held copy.
module tb_parity_ff;
  logic clk = 0, rst, s8;
  logic nb_in, nb, model;
  int checks = 0, failures = 0;

  parity_ff dut (.clk, .rst, .s8, .d(nb_in), .q(nb));

  always #5 clk = ~clk;

  initial begin
    rst = 1; s8 = 0; nb_in = 0; model = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 300; i++) begin
      s8 = 1'($urandom); nb_in = 1'($urandom); rst = ($urandom % 20) == 0;
      @(posedge clk);
      if (rst) model = 0; else if (s8) model = nb_in;
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
