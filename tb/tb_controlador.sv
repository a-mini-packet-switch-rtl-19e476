// Testbench for controlador. A model of the rest of the switch answers the
// controller: E0 comes a random time after each rearm and stays until S3,
// E1 and E2 come a random time after S2/S12 rise and stay until they drop,
// and DROP is raised during S4 or S5 for chosen packets. The sequence of
// active outputs must match the expected order for a forwarded packet,
// for a parity drop and for a TTL drop.
module tb_controlador;
  import mps_pkg::*;

  logic           clk = 0, rstg, drop, e0, e1, e2;
  logic [N_S-1:0] s;
  int checks = 0, failures = 0;
  int mode = 0;            // 0 forward, 1 parity drop, 2 TTL drop
  int trace[$], expv[$];
  int last_idx = -1;
  logic last_active = 0;
  int e0_wait, e1_wait, e2_wait;

  controlador dut (.clk, .rstg, .drop, .e0, .e1, .e2, .s);

  always #5 clk = ~clk;

  always_comb drop = (mode == 1 && s[S_PAR_CHK]) || (mode == 2 && s[S_TTL_CHK]);

  // Environment model.
  always_ff @(posedge clk) begin
    if (rstg) begin
      e0 <= 0; e1 <= 0; e2 <= 0;
      e0_wait <= 3; e1_wait <= 4; e2_wait <= 6;
    end else begin
      if (s[S_REARM]) begin
        e0 <= 0; e0_wait <= 1 + $urandom % 8;
      end else if (!e0) begin
        if (e0_wait == 0) e0 <= 1; else e0_wait <= e0_wait - 1;
      end
      if (!s[S_SHIFT10]) begin
        e1 <= 0; e1_wait <= 1 + $urandom % 12;
      end else if (e1_wait == 0) e1 <= 1; else e1_wait <= e1_wait - 1;
      if (!s[S_XMIT]) begin
        e2 <= 0; e2_wait <= 1 + $urandom % 30;
      end else if (e2_wait == 0) e2 <= 1; else e2_wait <= e2_wait - 1;
    end
  end

  // Trace of active outputs; a run of one output on consecutive clocks
  // counts once.
  always @(posedge clk) if (!rstg) begin
    int idx;
    idx = -1;
    for (int i = 0; i < N_S; i++) if (s[i]) idx = i;
    if (idx >= 0 && !(last_active && idx == last_idx)) trace.push_back(idx);
    last_active = (idx >= 0);
    last_idx = idx;
  end

  task automatic add_expected(int m);
    int fwd[]  = '{0, 1, 2, 3, 0, 0, 1, 4, 5, 6, 7, 8, 9, 10, 11, 12, 3, 0};
    int par[]  = '{0, 1, 2, 3, 0, 0, 1, 4, 3, 0};
    int ttl[]  = '{0, 1, 2, 3, 0, 0, 1, 4, 5, 3, 0};
    if (m == 0) foreach (fwd[i]) expv.push_back(fwd[i]);
    if (m == 1) foreach (par[i]) expv.push_back(par[i]);
    if (m == 2) foreach (ttl[i]) expv.push_back(ttl[i]);
  endtask

  initial begin
    rstg = 1;
    repeat (2) @(posedge clk);
    #1 rstg = 0;
    for (int p = 0; p < 30; p++) begin
      mode = (p % 5 == 3) ? 1 : (p % 5 == 4) ? 2 : 0;
      add_expected(mode);
      // Wait for the packet's final S0 step.
      while (trace.size() < expv.size()) @(posedge clk);
      #1;
    end
    checks++;
    if (trace.size() != expv.size()) begin
      failures++;
      $display("FAIL trace length %0d expected %0d", trace.size(), expv.size());
    end
    for (int i = 0; i < expv.size() && i < trace.size(); i++) begin
      checks++;
      if (trace[i] != expv[i]) begin
        failures++;
        $display("FAIL step %0d: S%0d expected S%0d", i, trace[i], expv[i]);
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
