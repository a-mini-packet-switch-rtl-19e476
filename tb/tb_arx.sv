// Testbench for arx: a serial sender with the same bit period as the baud
// tick (8 clocks here) but a random phase sends random characters. Each must
// appear on B with E0 raised, E0 must hold until S3, and a character with a
// 0 stop bit must be dropped.
module tb_arx;
  localparam int BITCLK = 8;

  logic       clk = 0, rstg, bt, pctx, s3, e0;
  logic [7:0] b;
  int checks = 0, failures = 0, tdiv = 0;

  arx dut (.clk, .rstg, .bt, .pctx, .s3, .b, .e0);

  always #5 clk = ~clk;
  always_ff @(posedge clk) tdiv <= (tdiv == BITCLK - 1) ? 0 : tdiv + 1;
  assign bt = (tdiv == BITCLK - 1);

  task automatic send(input logic [7:0] data, input logic stopbit);
    logic [9:0] f = {stopbit, data, 1'b0};
    for (int i = 0; i < 10; i++) begin
      pctx = f[i];
      repeat (BITCLK) @(posedge clk);
      #1;
    end
    pctx = 1'b1;
  endtask

  task automatic expect_e0(input logic want, input string what);
    checks++;
    if (e0 !== want) begin
      failures++;
      $display("FAIL %s: e0=%b", what, e0);
    end
  endtask

  initial begin
    logic [7:0] d;
    rstg = 1; pctx = 1; s3 = 0;
    repeat (3) @(posedge clk);
    #1 rstg = 0;
    for (int n = 0; n < 40; n++) begin
      repeat ($urandom % (2 * BITCLK)) @(posedge clk);
      #1;
      d = 8'($urandom);
      if (n % 8 == 7) begin
        send(d, 1'b0);              // framing error
        repeat (3 * BITCLK) @(posedge clk);
        #1 expect_e0(1'b0, "bad stop bit accepted");
      end else begin
        send(d, 1'b1);
        repeat (BITCLK) @(posedge clk);
        #1 expect_e0(1'b1, "byte not signalled");
        checks++;
        if (b !== d) begin
          failures++;
          $display("FAIL byte %0d: got %h expected %h", n, b, d);
        end
        // Held while not rearmed, even if the line moves.
        send(8'h00, 1'b1);
        #1 expect_e0(1'b1, "E0 not held");
        checks++;
        if (b !== d) begin
          failures++;
          $display("FAIL byte %0d overwritten before rearm", n);
        end
        s3 = 1; @(posedge clk); #1 s3 = 0;
        expect_e0(1'b0, "rearm ignored");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * 40 * BITCLK) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
