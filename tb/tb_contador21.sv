// Testbench for contador21: with a baud tick every 7 clocks, S12 must pass
// exactly 21 ticks as BTP, then raise E2 after 21 tick periods.
module tb_contador21;
  logic clk = 0, rst, bt, s12, btp, e2;
  int checks = 0, failures = 0;
  int pulses, ticks, tdiv = 0;

  contador21 dut (.clk, .rst, .bt, .s12, .btp, .e2);

  always #5 clk = ~clk;

  always_ff @(posedge clk) tdiv <= (tdiv == 6) ? 0 : tdiv + 1;
  assign bt = (tdiv == 6);

  initial begin
    rst = 1; s12 = 0;
    @(posedge clk); #1 rst = 0;
    for (int run = 0; run < 3; run++) begin
      repeat (5 + run) @(posedge clk);
      #1 s12 = 1;
      #1;
      pulses = 0; ticks = 0;
      while (!e2 && ticks < 60) begin
        if (btp) begin
          pulses++;
          checks++;
        end
        if (btp && !bt) begin
          failures++;
          $display("FAIL BTP without baud tick");
        end
        if (bt) ticks++;
        @(posedge clk); #1;
      end
      checks++;
      if (pulses != 21) begin
        failures++;
        $display("FAIL run %0d: %0d pulses", run, pulses);
      end
      checks++;
      if (ticks != 21) begin
        failures++;
        $display("FAIL run %0d: E2 after %0d ticks", run, ticks);
      end
      repeat (20) @(posedge clk);
      #1;
      checks++;
      if (!e2 || btp) failures++;
      s12 = 0;
      @(posedge clk); #1;
      checks++;
      if (e2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
