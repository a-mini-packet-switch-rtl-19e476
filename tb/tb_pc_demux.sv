// Testbench for pc_demux: the latched destination receives Q[0], the other
// lines stay at 1, and the destination only changes on S10.
module tb_pc_demux;
  logic       clk = 0, rst, s10, q0;
  logic [1:0] q_dst, model;
  logic [3:0] pc_rx, expv;
  int checks = 0, failures = 0;

  pc_demux dut (.clk, .rst, .s10, .q_dst, .q0, .pc_rx);

  always #5 clk = ~clk;

  initial begin
    rst = 1; s10 = 0; q_dst = 0; q0 = 1; model = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 300; i++) begin
      s10 = ($urandom % 5) == 0; q_dst = 2'($urandom);
      @(posedge clk);
      if (s10) model = q_dst;
      #1;
      s10 = 0; q_dst = 2'($urandom); q0 = 1'($urandom);
      #1;
      expv = 4'b1111;
      expv[model] = q0;
      checks++;
      if (pc_rx !== expv) begin
        failures++;
        $display("FAIL cycle %0d pc_rx=%b expected %b", i, pc_rx, expv);
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
