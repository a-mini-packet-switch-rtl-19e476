// Testbench for btg at its default 4 MHz / 9600 Bd setting: ticks must be
// one clock wide and exactly 417 clocks apart (4e6 / 9600 rounded).
module tb_btg;
  logic clk = 0, rstg, bt;
  int checks = 0, failures = 0;
  int last, n, cyc = 0;

  btg dut (.clk, .rstg, .bt);

  always #125 clk = ~clk;   // 4 MHz

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    rstg = 1;
    repeat (2) @(posedge clk);
    #1 rstg = 0;
    last = -1; n = 0;
    while (n < 12) begin
      @(posedge clk); #1;
      if (bt) begin
        if (last >= 0) begin
          checks++;
          if (cyc - last != 417) begin
            failures++;
            $display("FAIL tick interval %0d", cyc - last);
          end
        end
        last = cyc; n++;
        @(posedge clk); #1;
        checks++;
        if (bt) begin
          failures++;
          $display("FAIL tick wider than one clock");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
