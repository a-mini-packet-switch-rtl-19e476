// Chat-session workload for mini_packet_switch at its default parameters.
//
// Each of the four computers first announces a nickname to the three
// others, one character per packet with the message-type bit set, and
// then sends a line of text, one character per packet with the type bit
// clear, to one other computer. The switch has no broadcast address, so an
// announcement goes to each peer in turn. A computer that has nothing to
// send when polled sends a filler packet (zero character, TTL 3) to PC1.
// Every receiver rebuilds the strings per sender and type; at the end each
// must hold exactly what was sent to it, in order, and no packet may be
// dropped since all are sent with correct parity and TTL 3.
module tb_chat_session;
  localparam int BIT = 417;                 // clocks per bit, 4e6 / 9600

  logic       clk = 0, rstg;
  logic [3:0] pc_tx, pc_rx, en_pc;
  int checks = 0, failures = 0;

  mini_packet_switch dut (.clk, .rstg, .pc_tx, .pc_rx, .en_pc);

  always #125 clk = ~clk;

  logic [15:0] txq [4][$];
  string nick [4] = '{"ann", "bob", "cy", "dee"};
  string line [4] = '{"hi bob", "yo cy", "hey dee", "ok ann"};
  string got_nick [4][4];                   // [receiver][sender]
  string got_text [4][4];
  int rises [4];
  logic [3:0] en_prev = '0;
  bit quiet = 0;
  int n_fill = 0;

  function automatic logic [15:0] pkt(int src, int dst, logic typ, byte c);
    logic [7:0] h, m;
    m = c;
    h = {1'b0, typ, 2'd3, 2'(src), 2'(dst)};
    h[7] = ($countones(m) + $countones(h[6:0])) % 2 == 1;
    return {m, h};
  endfunction

  always @(posedge clk) if (!rstg) begin
    for (int i = 0; i < 4; i++) if (en_pc[i] && !en_prev[i]) rises[i]++;
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
    initial begin
      int used = 0;
      logic [15:0] p;
      pc_tx[gi] = 1'b1;
      @(negedge rstg);
      forever begin
        wait (rises[gi] > used);
        used++;
        wait (!quiet);
        if (txq[gi].size() > 0) p = txq[gi].pop_front();
        else begin
          p = pkt(gi, 1, 1'b0, 8'h00);
          n_fill++;
        end
        repeat ($urandom % 200) @(posedge clk);
        #3;
        send_char(gi, p[7:0]);
        wait (rises[gi] > used);
        used++;
        repeat ($urandom % 200) @(posedge clk);
        #3;
        send_char(gi, p[15:8]);
      end
    end

    initial begin
      logic [7:0] by [2];
      int src;
      @(negedge rstg);
      forever begin
        for (int c = 0; c < 2; c++) begin
          @(negedge pc_rx[gi]);
          repeat (BIT / 2) @(posedge clk);
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
        src = by[0][3:2];
        checks++;
        if (by[0][1:0] != 2'(gi) || by[0][5:4] != 2'd2 ||
            ($countones(by[0]) + $countones(by[1])) % 2 != 0) begin
          failures++;
          $display("FAIL PC%0d: bad header %h", gi, by[0]);
        end
        if (by[1] != 8'h00) begin
          if (by[0][6]) got_nick[gi][src] = {got_nick[gi][src], string'(by[1])};
          else          got_text[gi][src] = {got_text[gi][src], string'(by[1])};
        end
      end
    end
  end

  initial begin
    rstg = 1'b1;
    for (int i = 0; i < 4; i++) begin
      for (int d = 1; d < 4; d++)
        for (int k = 0; k < nick[i].len(); k++)
          txq[i].push_back(pkt(i, (i + d) % 4, 1'b1, nick[i][k]));
      for (int k = 0; k < line[i].len(); k++)
        txq[i].push_back(pkt(i, (i + 1) % 4, 1'b0, line[i][k]));
    end
    repeat (5) @(posedge clk);
    #1 rstg = 1'b0;
    wait (txq[0].size() == 0 && txq[1].size() == 0 && txq[2].size() == 0 && txq[3].size() == 0);
    quiet = 1;
    repeat (80 * BIT) @(posedge clk);
    for (int r = 0; r < 4; r++)
      for (int s = 0; s < 4; s++) begin
        string want_n, want_t;
        want_n = (s != r) ? nick[s] : "";
        want_t = (r == (s + 1) % 4) ? line[s] : "";
        checks++;
        if (got_nick[r][s] != want_n) begin
          failures++;
          $display("FAIL PC%0d nickname from PC%0d: \"%s\" expected \"%s\"", r, s, got_nick[r][s], want_n);
        end
        checks++;
        if (got_text[r][s] != want_t) begin
          failures++;
          $display("FAIL PC%0d text from PC%0d: \"%s\" expected \"%s\"", r, s, got_text[r][s], want_t);
        end
      end
    $display("PC1 saw \"%s\" from %s and \"%s\" from %s; %0d filler packets",
             got_text[1][0], got_nick[1][0], got_nick[1][2], nick[2], n_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
