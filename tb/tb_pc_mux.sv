// Testbench for pc_mux: every select value with random line patterns.
module tb_pc_mux;
  logic [3:0] pc_tx;
  logic [1:0] sel;
  logic       pctx;
  int checks = 0, failures = 0;

  pc_mux dut (.pc_tx, .sel, .pctx);

  initial begin
    for (int i = 0; i < 64; i++) begin
      pc_tx = 4'($urandom);
      sel   = 2'(i);
      #1;
      checks++;
      if (pctx !== ((pc_tx >> sel) & 1'b1)) begin
        failures++;
        $display("FAIL pc_tx=%b sel=%0d pctx=%b", pc_tx, sel, pctx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
