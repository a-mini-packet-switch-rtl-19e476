// Testbench for paridade: random frames, parity worked out by bit counting.
module tb_paridade;
  logic       s4, rst1, nb9;
  logic [7:0] q_msg, q_hdr;
  int checks = 0, failures = 0;
  int ones_all, ones_gen;

  paridade dut (.s4, .q_msg, .q_hdr, .rst1, .nb9);

  initial begin
    for (int i = 0; i < 400; i++) begin
      s4    = 1'($urandom);
      q_msg = 8'($urandom);
      q_hdr = 8'($urandom);
      #1;
      ones_all = $countones(q_msg) + $countones(q_hdr);
      ones_gen = $countones(q_msg) + $countones(q_hdr[6:0]);
      checks++;
      if (rst1 !== (s4 && (ones_all % 2 == 1))) begin
        failures++;
        $display("FAIL rst1 s4=%b msg=%h hdr=%h", s4, q_msg, q_hdr);
      end
      checks++;
      if (nb9 !== 1'(ones_gen % 2)) begin
        failures++;
        $display("FAIL nb9 msg=%h hdr=%h", q_msg, q_hdr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
