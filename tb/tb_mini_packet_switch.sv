// End-to-end testbench for mini_packet_switch at its default parameters
// (4 MHz clock, 9600 Bd, 417 clocks per bit).
//
// Four computer models share the switch. Each one waits for its enable,
// sends the header character, waits for the enable to come back, then sends
// the message character (8 data bits, LSB first, two stop bits, random
// phase). A computer with nothing left to say sends a filler packet to PC1.
// Each computer also runs a receiver that samples its line at mid-bit and
// checks every received frame against a reference of the switch's rules:
// even parity over the message and header, TTL decremented, a zero TTL or a
// parity error dropping the packet, parity regenerated, frame delivered to
// the destination PC only. The gap from the first to the second start bit
// on the output must be 10 bit times.
//
// Counted mechanisms, each of which must occur: forwarded packets, parity
// drops, TTL drops, loopback to the sender, a TTL of 0 wrapping to 3,
// polling of every PC and the polling counter wrapping from PC3 to PC0.
module tb_mini_packet_switch;
  localparam int BIT      = 417;            // clocks per bit, 4e6 / 9600
  localparam int N_PKT    = 6;              // queued packets per PC

  logic       clk = 0, rstg;
  logic [3:0] pc_tx, pc_rx, en_pc;
  int checks = 0, failures = 0;

  mini_packet_switch dut (.clk, .rstg, .pc_tx, .pc_rx, .en_pc);

  always #125 clk = ~clk;   // 4 MHz

  // Packet as {message, header}; header bit k is frame bit k+2.
  logic [15:0] txq  [4][$];
  logic [15:0] expq [4][$];
  int rises [4];
  int sent_total = 0, recv_total = 0;
  int n_fwd = 0, n_par_drop = 0, n_ttl_drop = 0, n_loop = 0, n_wrap_ttl = 0;
  int n_polled [4];
  int n_poll_wrap = 0;
  logic [3:0] en_prev = '0;
  int last_pc = -1;
  bit quiet = 0;             // computers stop starting new packets

  function automatic logic [7:0] make_hdr(int src, int dst, int ttl, logic typ,
                                          logic [7:0] msg, logic bad);
    logic [7:0] h;
    h = {1'b0, typ, 2'(ttl), 2'(src), 2'(dst)};
    h[7] = ($countones(msg) + $countones(h[6:0])) % 2 == 1;
    if (bad) h[7] = ~h[7];
    return h;
  endfunction

  // What the switch must do with one packet.
  task automatic account(int src, logic [15:0] pkt);
    logic [7:0] h, m;
    int ttl, nttl;
    m = pkt[15:8]; h = pkt[7:0];
    ttl = h[5:4]; nttl = (ttl + 3) % 4;
    if (($countones(h) + $countones(m)) % 2 != 0) n_par_drop++;
    else if (nttl == 0) n_ttl_drop++;
    else begin
      h[5:4] = 2'(nttl);
      h[7] = ($countones(m) + $countones(h[6:0])) % 2 == 1;
      expq[h[1:0]].push_back({m, h});
      n_fwd++;
      if (h[1:0] == 2'(src)) n_loop++;
      if (ttl == 0) n_wrap_ttl++;
    end
  endtask

  // Enable windows seen by each PC; polling order checks.
  always @(posedge clk) if (!rstg) begin
    for (int i = 0; i < 4; i++) if (en_pc[i] && !en_prev[i]) begin
      rises[i]++;
      if (i != last_pc) begin
        n_polled[i]++;
        if (last_pc == 3 && i == 0) n_poll_wrap++;
        if (last_pc >= 0 && i != (last_pc + 1) % 4) begin
          failures++;
          $display("FAIL polling order: PC%0d after PC%0d", i, last_pc);
        end
        last_pc = i;
      end
    end
    if ($countones(en_pc) > 1) begin
      failures++;
      $display("FAIL several PCs enabled: %b", en_pc);
    end
    en_prev <= en_pc;
  end

  task automatic send_char(int i, logic [7:0] d);
    logic [11:0] f = {2'b11, d, 1'b0, 1'b1};
    for (int k = 1; k < 12; k++) begin
      pc_tx[i] = f[k];
      repeat (BIT) @(posedge clk);
      #7;
    end
  endtask

  for (genvar gi = 0; gi < 4; gi++) begin : g_pc
    // Transmitter of PC gi.
    initial begin
      int used = 0;
      logic [15:0] pkt;
      pc_tx[gi] = 1'b1;
      @(negedge rstg);
      forever begin
        wait (rises[gi] > used);
        used++;
        wait (!quiet);
        if (txq[gi].size() > 0) pkt = txq[gi].pop_front();
        else pkt = {8'h00, make_hdr(gi, 1, 0, 1'b0, 8'h00, 1'b0)};
        account(gi, pkt);
        sent_total++;
        repeat ($urandom % 300) @(posedge clk);
        #3;
        send_char(gi, pkt[7:0]);
        wait (rises[gi] > used);
        used++;
        repeat ($urandom % 300) @(posedge clk);
        #3;
        send_char(gi, pkt[15:8]);
      end
    end

    // Receiver of PC gi.
    initial begin
      logic [7:0] by [2];
      logic [15:0] want;
      longint t_start [2];
      @(negedge rstg);
      forever begin
        for (int c = 0; c < 2; c++) begin
          @(negedge pc_rx[gi]);
          t_start[c] = $time;
          repeat (BIT / 2) @(posedge clk);
          checks++;
          if (pc_rx[gi] !== 1'b0) begin
            failures++;
            $display("FAIL PC%0d: start bit too short", gi);
          end
          for (int k = 0; k < 8; k++) begin
            repeat (BIT) @(posedge clk);
            by[c][k] = pc_rx[gi];
          end
          repeat (BIT) @(posedge clk);
          checks++;
          if (pc_rx[gi] !== 1'b1) begin
            failures++;
            $display("FAIL PC%0d: stop bit missing", gi);
          end
        end
        recv_total++;
        checks++;
        if (expq[gi].size() == 0) begin
          failures++;
          $display("FAIL PC%0d: unexpected frame %h %h", gi, by[0], by[1]);
        end else begin
          want = expq[gi].pop_front();
          if ({by[1], by[0]} !== want) begin
            failures++;
            $display("FAIL PC%0d: frame %h%h expected %h", gi, by[1], by[0], want);
          end
        end
        checks++;
        if ((t_start[1] - t_start[0]) / 250 < 10 * BIT - 2 ||
            (t_start[1] - t_start[0]) / 250 > 10 * BIT + 2) begin
          failures++;
          $display("FAIL PC%0d: byte gap %0d clocks", gi, (t_start[1] - t_start[0]) / 250);
        end
      end
    end
  end

  task automatic require(int n, string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never seen: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    int queued;
    rstg = 1'b1;
    for (int i = 0; i < 4; i++) begin
      for (int k = 0; k < N_PKT; k++) begin
        logic [7:0] m;
        int dst, ttl;
        logic bad;
        m   = 8'h41 + 8'(4 * i + k);
        dst = (k == 3) ? i : $urandom % 4;
        ttl = (k == 1) ? 1 : (k == 4) ? 0 : 2 + $urandom % 2;
        bad = (k == 2);
        txq[i].push_back({m, make_hdr(i, dst, ttl, 1'(k == 5), m, bad)});
      end
    end
    queued = 4 * N_PKT;
    repeat (5) @(posedge clk);
    #1 rstg = 1'b0;
    // Run until every queued packet has been sent and every forwarded one
    // delivered.
    wait (txq[0].size() == 0 && txq[1].size() == 0 && txq[2].size() == 0 && txq[3].size() == 0);
    repeat (60 * BIT) @(posedge clk);
    quiet = 1;
    repeat (60 * BIT) @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (expq[i].size() != 0) begin
        failures++;
        $display("FAIL PC%0d: %0d frames never delivered", i, expq[i].size());
      end
    end
    $display("packets sent %0d (queued %0d), frames received %0d", sent_total, queued, recv_total);
    require(n_fwd, "forwarded");
    require(n_par_drop, "parity error drops");
    require(n_ttl_drop, "TTL expiry drops");
    require(n_loop, "loopback to sender");
    require(n_wrap_ttl, "TTL 0 wrapped to 3");
    for (int i = 0; i < 4; i++) require(n_polled[i], $sformatf("PC%0d polled", i));
    require(n_poll_wrap, "polling wrap PC3->PC0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
