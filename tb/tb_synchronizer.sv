// tb_synchronizer: synchronizer for the two-path expression
//   path (A+B);C end,  path D;(A+E) end        (A=0 B=1 C=2 D=3 E=4)
// in which A belongs to both paths.
// Phase 1 runs single events one at a time in a legal order and checks the
// handshake latencies: ack rises 2 or ARB_DELAY+2 clock edges after req
// (random priority), and falls 2 edges after req falls.
// Phase 2 lets five clients request their events as often as the four-phase
// protocol allows. Every acknowledged event is checked against a hand-written
// automaton of each path that holds it, events of one path must never
// overlap, ack may rise only while req is high and fall only while req is
// low. It counts how often requests wait on DIS, how often two conflicting
// IN lines compete in the arbiter, how often events of different paths run
// concurrently, and how often each event runs; each must happen.
module tb_synchronizer;
  import pathexpr_pkg::*;
  localparam int N = 5, NP = 2, NN = 10, DELAY = 4, ARB_DELAY = 3;
  localparam node_t NODES [NN] = '{
    ev_node(0), ev_node(1), union_node(0, 1), ev_node(2), seq_node(2, 3),
    ev_node(3), ev_node(0), ev_node(4), union_node(6, 7), seq_node(5, 8)};
  localparam int FIRST [NP] = '{0, 5};
  localparam int ROOT  [NP] = '{4, 9};
  localparam logic [N-1:0] MEM [NP] = '{5'b00111, 5'b11001};

  logic clk = 0, rst_n = 0;
  logic nb;
  logic [N-1:0] req, ack, ack_prev, req_prev;
  int state [NP];
  int checks = 0, failures = 0;
  int runs [N];
  int dis_wait = 0, contest = 0, concurrent = 0;
  bit phase2 = 0;

  synchronizer #(.N_EV(N), .N_PATH(NP), .NN(NN), .NODES(NODES), .FIRST(FIRST), .ROOT(ROOT),
                 .DELAY(DELAY), .ARB_DELAY(ARB_DELAY)) dut (
    .clk(clk), .rst_n(rst_n), .init(1'b0), .noise_bit(nb), .req(req), .ack(ack));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] allowed(int p, int s);
    if (p == 0) return (s == 0) ? 5'b00011 : 5'b00100;   // {A,B} then {C}
    else        return (s == 0) ? 5'b01000 : 5'b10001;   // {D} then {A,E}
  endfunction

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("%0t: %s", $time, m); end
  endtask

  // Reference model and protocol checks, every clock edge.
  always @(posedge clk) if (rst_n) begin
    #1;
    for (int e = 0; e < N; e++) begin
      if (ack[e] && !ack_prev[e]) begin
        check(req[e] && req_prev[e], $sformatf("ack %0d raised without req", e));
        for (int p = 0; p < NP; p++) if (MEM[p][e]) begin
          logic [N-1:0] al;
          al = allowed(p, state[p]);
          check(al[e], $sformatf("event %0d violates path %0d in state %0d", e, p, state[p]));
          state[p] = 1 - state[p];
        end
        runs[e]++;
      end
      if (!ack[e] && ack_prev[e]) check(!req_prev[e], $sformatf("ack %0d lowered while req high", e));
    end
    for (int p = 0; p < NP; p++)
      check($countones(ack & MEM[p]) <= 1, $sformatf("events of path %0d overlap: ack=%b", p, ack));
    if (phase2) begin
      for (int e = 0; e < N; e++) begin
        bit ok;
        ok = 1;
        for (int p = 0; p < NP; p++) if (MEM[p][e] && !allowed(p, state[p])[e]) ok = 0;
        if (req[e] && !ack[e] && !ok) dis_wait++;
      end
      if ((dut.in_req & MEM[0]) != 0 && $countones(dut.in_req & MEM[0]) >= 2) contest++;
      if ($countones(ack) >= 2) concurrent++;
    end
    ack_prev = ack;
    req_prev = req;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // legal single-event cycle: D A C D E B C
    int order [7] = '{3, 0, 2, 3, 4, 1, 2};
    int lat;
    for (int e = 0; e < N; e++) runs[e] = 0;
    state[0] = 0; state[1] = 0;
    req = '0; nb = 0; ack_prev = '0; req_prev = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    for (int k = 0; k < 21; k++) begin
      int e;
      e = order[k % 7];
      @(negedge clk);
      nb = 1'($urandom);
      req[e] = 1;
      lat = 0;
      do begin @(posedge clk); #2; lat++; end while (!ack[e] && lat < 100);
      check(lat == 2 || lat == ARB_DELAY + 2, $sformatf("ack %0d rise latency %0d", e, lat));
      repeat (DELAY + 4) @(posedge clk);
      @(negedge clk);
      req[e] = 0;
      lat = 0;
      do begin @(posedge clk); #2; lat++; end while (ack[e] && lat < 100);
      check(lat == 2, $sformatf("ack %0d fall latency %0d", e, lat));
      repeat (DELAY + 6) @(posedge clk);
    end
    phase2 = 1;
    for (int i = 0; i < 30000; i++) begin
      @(negedge clk);
      nb = 1'($urandom);
      for (int e = 0; e < N; e++) begin
        if (!req[e] && !ack[e] && $urandom_range(0, 2) == 0) req[e] = 1;
        else if (req[e] && ack[e] && $urandom_range(0, 3) == 0) req[e] = 0;
      end
    end
    phase2 = 0;
    for (int e = 0; e < N; e++) check(runs[e] > 30, $sformatf("event %0d ran %0d times", e, runs[e]));
    check(dis_wait > 0, "no request waited on DIS");
    check(contest > 0, "no arbitration contest");
    check(concurrent > 0, "no concurrent events");
    $display("runs A..E = %0d %0d %0d %0d %0d; dis_wait=%0d contest=%0d concurrent=%0d",
             runs[0], runs[1], runs[2], runs[3], runs[4], dis_wait, contest, concurrent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
