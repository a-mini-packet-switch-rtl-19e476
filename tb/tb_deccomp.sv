// Testbench for deccomp: all TTL values with S5 low and high.
module tb_deccomp;
  logic s5, q7, q6, rst2, nb07, nb06;
  int checks = 0, failures = 0;
  int ttl, nttl;

  deccomp dut (.s5, .q7, .q6, .rst2, .nb07, .nb06);

  initial begin
    for (int i = 0; i < 8; i++) begin
      {s5, q7, q6} = 3'(i);
      #1;
      ttl  = 2 * q7 + q6;
      nttl = (ttl + 3) % 4;
      checks++;
      if ({nb07, nb06} !== 2'(nttl)) begin
        failures++;
        $display("FAIL ttl=%0d new=%b%b expected %0d", ttl, nb07, nb06, nttl);
      end
      checks++;
      if (rst2 !== (s5 && nttl == 0)) begin
        failures++;
        $display("FAIL s5=%b ttl=%0d rst2=%b", s5, ttl, rst2);
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
