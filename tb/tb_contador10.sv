// Testbench for contador10: S2 must yield exactly 10 SP pulses in 10
// consecutive clocks, then E1, held until S2 drops; repeated to show the
// counter returns to its start.
module tb_contador10;
  logic clk = 0, rst, s2, sp, e1;
  int checks = 0, failures = 0;
  int pulses, cycles;

  contador10 dut (.clk, .rst, .s2, .sp, .e1);

  always #5 clk = ~clk;

  initial begin
    rst = 1; s2 = 0;
    @(posedge clk); #1 rst = 0;
    for (int run = 0; run < 3; run++) begin
      repeat (3) @(posedge clk);
      #1 s2 = 1;
      #1;
      pulses = 0; cycles = 0;
      while (!e1 && cycles < 50) begin
        if (sp) pulses++;
        @(posedge clk); #1 cycles++;
      end
      checks++;
      if (pulses != 10) begin
        failures++;
        $display("FAIL run %0d: %0d pulses", run, pulses);
      end
      checks++;
      if (cycles != 10) begin
        failures++;
        $display("FAIL run %0d: E1 after %0d clocks", run, cycles);
      end
      repeat (4) @(posedge clk);
      #1;
      checks++;
      if (!e1 || sp) begin
        failures++;
        $display("FAIL run %0d: E1 not held or SP after done", run);
      end
      s2 = 0;
      @(posedge clk); #1;
      checks++;
      if (e1) begin
        failures++;
        $display("FAIL run %0d: E1 stuck", run);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
