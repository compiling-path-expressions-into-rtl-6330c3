// tb_lru_arbiter: least-recently-served arbiter on four events with the
// conflict graph of path (A+B+C) end, path (C+D) end. A, B and C conflict
// pairwise, and D conflicts with C only. K=4 priority levels and one clk
// cycle per delay line.
//
// Part 1 is directed. A and C request together three times:
//   - Both start at priority 0, so A wins on index order, K+2 edges after the
//     request. C is blocked.
//   - C now has priority 1, so it wins after K+1 edges, ahead of A.
//   - A, blocked in turn, wins the third round.
// A withdrawn request keeps its priority.
//
// Part 2 runs random requesters for 20000 cycles. Each cycle it compares the
// acks with a reference model of the LRU rule:
//   - priority = number of blocks since the last acknowledge, at most K-1;
//   - a request is seen (K-priority)+1 cycles after it rises;
//   - held grants stay;
//   - seen requests are granted in index order when nothing conflicting
//     holds a grant.
// It also checks mutual exclusion. It counts grants made at raised
// priority, at the highest priority, and concurrent A/D grants, and fails
// if any of these never happen.
module tb_lru_arbiter;
  localparam int N = 4, K = 4;
  localparam logic [N-1:0][N-1:0] CONF = {4'b0100, 4'b1011, 4'b0101, 4'b0110};

  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_req, ack;
  int checks = 0, failures = 0;

  // Reference model state.
  int m_blocks [N];
  int m_age    [N];
  logic [N-1:0] m_prev, m_ack;
  int raised = 0, top_prio = 0, conc = 0;
  int grants [N];

  lru_arbiter #(.N_EV(N), .CONFLICT(CONF), .K(K), .LINE_DELAY(1)) dut (
    .clk(clk), .rst_n(rst_n), .in_req(in_req), .ack(ack));

  always #5 clk = ~clk;

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("%0t: %s", $time, m); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model step for one clock edge, from the values just before it.
  always @(posedge clk) begin
    if (rst_n) begin
      logic [N-1:0] g, seen;
      g = m_ack & in_req;
      for (int e = 0; e < N; e++)
        seen[e] = in_req[e] && m_prev[e] && (m_age[e] >= K - m_blocks[e]);
      for (int e = 0; e < N; e++)
        if (seen[e] && !g[e] && ((g & CONF[e]) == 0)) g[e] = 1'b1;
      for (int e = 0; e < N; e++) begin
        if (g[e] && !m_ack[e]) begin
          grants[e]++;
          if (m_blocks[e] > 0)     raised++;
          if (m_blocks[e] == K - 1) top_prio++;
          m_blocks[e] = 0;
        end else if (in_req[e] && !g[e] && ((g & ~m_ack & CONF[e]) != 0)) begin
          if (m_blocks[e] < K - 1) m_blocks[e]++;
        end
        if (in_req[e] && !m_prev[e]) m_age[e] = 0;
        else if (in_req[e])          m_age[e]++;
      end
      if (g[0] && g[3]) conc++;
      m_prev = in_req;
      m_ack  = g;
    end
  end

  // Raise the requests in mask together and count edges until an ack.
  task automatic race(logic [N-1:0] mask, int exp_winner, int exp_edges);
    int n = 0;
    @(negedge clk);
    in_req = mask;
    do begin
      @(posedge clk); #1;
      n++;
    end while ((ack & mask) == 0 && n < 20);
    check(ack == (N'(1) << exp_winner),
          $sformatf("race %b: ack %b, expected winner %0d", mask, ack, exp_winner));
    check(n == exp_edges, $sformatf("race %b: %0d edges, expected %0d", mask, n, exp_edges));
    @(negedge clk);
    in_req = '0;
    repeat (3) @(posedge clk);
    #1 check(ack == '0, "ack not released");
  endtask

  initial begin
    in_req = '0;
    m_prev = '0; m_ack = '0;
    for (int e = 0; e < N; e++) begin m_blocks[e] = 0; m_age[e] = 0; grants[e] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;

    race(4'b0101, 0, K + 2);   // equal priority: index order
    race(4'b0101, 2, K + 1);   // C was blocked once
    race(4'b0101, 0, K + 1);   // now A was blocked once
    for (int e = 0; e < N; e++) grants[e] = 0;
    raised = 0; top_prio = 0;

    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      check(ack == m_ack, $sformatf("ack %b, model %b", ack, m_ack));
      for (int e = 0; e < N; e++) begin
        check(!(ack[e] && ((ack & CONF[e]) != 0)), "conflicting acks");
        if (!in_req[e] && !ack[e]) begin
          if ($urandom_range(0, 2) == 0) in_req[e] = 1;
        end else if (in_req[e] && ack[e]) begin
          if ($urandom_range(0, 3) == 0) in_req[e] = 0;
        end else if (in_req[e] && !ack[e] && $urandom_range(0, 40) == 0) begin
          in_req[e] = 0;             // withdrawn, as when a CLR pulls IN low
        end
      end
    end
    in_req = '0;
    repeat (5) @(posedge clk);

    $display("grants A..D = %0d %0d %0d %0d, at raised priority %0d, at top %0d, A||D %0d",
             grants[0], grants[1], grants[2], grants[3], raised, top_prio, conc);
    for (int e = 0; e < N; e++) check(grants[e] > 0, $sformatf("event %0d never granted", e));
    check(raised > 0,   "no grant at raised priority");
    check(top_prio > 0, "highest priority never reached");
    check(conc > 0,     "non-conflicting events never granted together");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
