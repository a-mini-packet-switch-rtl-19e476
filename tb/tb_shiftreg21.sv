// Testbench for shiftreg21. First the switch's own sequence: load a byte,
// shift it ten places, load a second byte, rewrite TTL and parity, set the
// framing bits and shift the frame out, checking every bit against the
// expected frame. Then random control patterns against a bit-level model.
module tb_shiftreg21;
  logic        clk = 0, rstg, rst1, rst2, s1, s7, nb9, s9, s11, btp, sp;
  logic [7:0]  b;
  logic [1:0]  nb;
  logic [20:0] q, model, expf;
  int checks = 0, failures = 0;

  shiftreg21 dut (.clk, .rstg, .rst1, .rst2, .b, .s1, .nb, .s7, .nb9, .s9, .s11, .btp, .sp, .q);

  always #5 clk = ~clk;

  task automatic idle();
    {rstg, rst1, rst2, s1, s7, s9, s11, btp, sp} = '0;
  endtask

  task automatic tick();
    @(posedge clk); #1; idle();
  endtask

  task automatic cmp(input logic [20:0] want, input string what);
    checks++;
    if (q !== want) begin
      failures++;
      $display("FAIL %s: q=%b expected %b", what, q, want);
    end
  endtask

  initial begin
    logic [7:0] h, m;
    idle(); b = 0; nb = 0; nb9 = 0;
    rstg = 1; tick();
    cmp('1, "reset value");
    for (int n = 0; n < 20; n++) begin
      h = 8'($urandom); m = 8'($urandom);
      b = h; s1 = 1; tick();
      for (int i = 0; i < 10; i++) begin sp = 1; tick(); end
      checks++;
      if (q[9:2] !== h) begin
        failures++;
        $display("FAIL header not at b09..b02: %b", q);
      end
      b = m; s1 = 1; tick();
      nb = 2'($urandom); s7 = 1; tick();
      nb9 = 1'($urandom); s9 = 1; tick();
      s11 = 1; tick();
      expf = {1'b1, m, 1'b0, 1'b1, nb9, h[6], nb, h[3:0], 1'b0, 1'b1};
      cmp(expf, "assembled frame");
      for (int i = 0; i < 21; i++) begin
        checks++;
        if (q[0] !== expf[i]) begin
          failures++;
          $display("FAIL serial bit %0d", i);
        end
        btp = 1; tick();
      end
      cmp('1, "register after transmission");
      case (n % 3)
        0: rstg = 1;
        1: rst1 = 1;
        default: rst2 = 1;
      endcase
      b = 8'h00; s1 = 1; tick();
      cmp('1, "reset over load");
    end
    // Random control patterns against a reference model.
    model = q;
    for (int i = 0; i < 2000; i++) begin
      {s1, s7, s9, s11} = 4'($urandom) & 4'($urandom);
      btp = ($urandom % 4) == 0; sp = ($urandom % 4) == 0;
      rst1 = ($urandom % 64) == 0;
      b = 8'($urandom); nb = 2'($urandom); nb9 = 1'($urandom);
      if (rst1) model = '1;
      else begin
        if (btp || sp) model = {1'b1, model[20:1]};
        if (s1)  model[19:12] = b;
        if (s7)  model[7:6] = nb;
        if (s9)  model[9] = nb9;
        if (s11) {model[20], model[11], model[10], model[1], model[0]} = 5'b10101;
      end
      tick();
      cmp(model, "random step");
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
