// tb_pathexpr_top: end-to-end test of the top at its default parameters, the
// synchronizer for
//   path (A+B+D) end, path (B;(C+D);E) end, path (E+F+G) end
// (A..G = bits 0..6). Seven clients run four-phase req/ack handshakes.
// Phase 1 runs one legal round B C E B D E A F G one event at a time and
// checks the handshake latencies (ack rises 2 or ARB_DELAY+2 clock edges
// after req, falls 2 edges after req falls). Phase 2 lets all clients request
// at random for many rounds, with two quiet points where init re-starts
// every sequencer. Every acknowledged event is checked against a hand-written
// automaton of each path that holds it; events of one path must never
// overlap; ack only rises while req is high and only falls while req is low;
// no request that every path allows may wait forever.
// Mechanisms counted, each of which must occur: a request waiting on DIS, two
// conflicting IN lines competing in the arbiter, a request held off by a
// conflicting event's CLR, a pending IN withdrawn before its ack, concurrent
// events of different paths, both arbiter delay settings, and init.
module tb_pathexpr_top;
  localparam int N = 7, NP = 3, DELAY = 4, ARB_DELAY = 3;
  localparam logic [N-1:0] MEM [NP] = '{7'b0001011, 7'b0011110, 7'b1110000};

  logic clk = 0, rst_n = 0;
  logic init, nb;
  logic [N-1:0] req, ack, ack_prev, req_prev, in_prev;
  int state [NP];
  int checks = 0, failures = 0;
  int runs [N];
  int starve [N];
  int dis_wait = 0, contest = 0, clr_hold = 0, withdrawn = 0, concurrent = 0;
  int fast = 0, slow = 0, inits = 0;
  bit phase2 = 0;

  pathexpr_top dut (.clk(clk), .rst_n(rst_n), .init(init), .noise_bit(nb), .req(req), .ack(ack));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] allowed(int p, int s);
    case (p)
      0: return 7'b0001011;                                   // {A,B,D}
      1: return (s == 0) ? 7'b0000010 : (s == 1) ? 7'b0001100 : 7'b0010000;  // {B} {C,D} {E}
      default: return 7'b1110000;                             // {E,F,G}
    endcase
  endfunction

  function automatic bit legal(int e);
    for (int p = 0; p < NP; p++) if (MEM[p][e] && !allowed(p, state[p])[e]) return 0;
    return 1;
  endfunction

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("%0t: %s", $time, m); end
  endtask

  always @(posedge clk) if (rst_n) begin
    logic [N-1:0] in_now, clr_now, conf;
    #1;
    in_now = dut.u_sync.in_req;
    clr_now = dut.u_sync.clr;
    for (int e = 0; e < N; e++) begin
      if (ack[e] && !ack_prev[e]) begin
        check(req[e] && req_prev[e], $sformatf("ack %0d raised without req", e));
        for (int p = 0; p < NP; p++) if (MEM[p][e]) begin
          check(allowed(p, state[p])[e], $sformatf("event %0d violates path %0d in state %0d", e, p, state[p]));
          if (p == 1) state[1] = (state[1] + 1) % 3;
        end
        runs[e]++;
      end
      if (!ack[e] && ack_prev[e]) check(!req_prev[e], $sformatf("ack %0d lowered while req high", e));
      if (phase2) begin
        conf = '0;
        for (int p = 0; p < NP; p++) if (MEM[p][e]) conf |= MEM[p];
        conf[e] = 1'b0;
        if (req[e] && !ack[e] && !legal(e)) dis_wait++;
        if (req[e] && !ack[e] && legal(e) && (clr_now & conf) != 0) clr_hold++;
        if (in_prev[e] && !in_now[e] && !ack[e] && !ack_prev[e]) withdrawn++;
        if (in_now[e] && (in_now & conf) != 0) contest++;
        // liveness: a legal request with no conflicting event active
        if (req[e] && !ack[e] && legal(e) && ((ack | req) & conf) == 0) starve[e]++;
        else starve[e] = 0;
        check(starve[e] < 40, $sformatf("legal request %0d starved", e));
      end
    end
    for (int p = 0; p < NP; p++)
      check($countones(ack & MEM[p]) <= 1, $sformatf("events of path %0d overlap: ack=%b", p, ack));
    if (phase2 && $countones(ack) >= 2) concurrent++;
    ack_prev = ack;
    req_prev = req;
    in_prev = in_now;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic quiesce_and_init();
    req = '0;
    repeat (3 * DELAY + 20) @(posedge clk);
    check(ack == '0, "not idle before init");
    @(negedge clk);
    init = 1;
    @(negedge clk);
    init = 0;
    for (int p = 0; p < NP; p++) state[p] = 0;
    inits++;
    repeat (3 * DELAY + 20) @(posedge clk);
  endtask

  initial begin
    int order [9] = '{1, 2, 4, 1, 3, 4, 0, 5, 6};   // B C E B D E A F G
    int lat;
    for (int e = 0; e < N; e++) begin runs[e] = 0; starve[e] = 0; end
    for (int p = 0; p < NP; p++) state[p] = 0;
    req = '0; nb = 0; init = 0; ack_prev = '0; req_prev = '0; in_prev = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    for (int k = 0; k < 27; k++) begin
      int e;
      e = order[k % 9];
      @(negedge clk);
      nb = 1'($urandom);
      req[e] = 1;
      lat = 0;
      do begin @(posedge clk); #2; lat++; end while (!ack[e] && lat < 100);
      check(lat == 2 || lat == ARB_DELAY + 2, $sformatf("ack %0d rise latency %0d", e, lat));
      if (lat == 2) fast++;
      if (lat == ARB_DELAY + 2) slow++;
      repeat (DELAY + 4) @(posedge clk);
      @(negedge clk);
      req[e] = 0;
      lat = 0;
      do begin @(posedge clk); #2; lat++; end while (ack[e] && lat < 100);
      check(lat == 2, $sformatf("ack %0d fall latency %0d", e, lat));
      repeat (DELAY + 6) @(posedge clk);
    end
    phase2 = 1;
    for (int round = 0; round < 3; round++) begin
      for (int i = 0; i < 20000; i++) begin
        @(negedge clk);
        nb = 1'($urandom);
        for (int e = 0; e < N; e++) begin
          if (!req[e] && !ack[e] && $urandom_range(0, 2) == 0) req[e] = 1;
          else if (req[e] && ack[e] && $urandom_range(0, 3) == 0) req[e] = 0;
        end
      end
      if (round < 2) begin
        // stop in the middle of path 2 if possible, then re-initialise
        phase2 = 0;
        quiesce_and_init();
        phase2 = 1;
      end
    end
    phase2 = 0;
    req = '0;
    repeat (3 * DELAY + 20) @(posedge clk);
    for (int e = 0; e < N; e++) check(runs[e] > 30, $sformatf("event %0d ran %0d times", e, runs[e]));
    check(dis_wait > 0, "no request waited on DIS");
    check(contest > 0, "no arbitration contest");
    check(clr_hold > 0, "no request held off by CLR");
    check(withdrawn > 0, "no IN withdrawn before ack");
    check(concurrent > 0, "no concurrent events");
    check(fast > 0 && slow > 0, "arbiter delay settings not both seen");
    check(inits == 2, "init not exercised");
    $display("runs A..G = %0d %0d %0d %0d %0d %0d %0d", runs[0], runs[1], runs[2], runs[3],
             runs[4], runs[5], runs[6]);
    $display("dis_wait=%0d contest=%0d clr_hold=%0d withdrawn=%0d concurrent=%0d fast=%0d slow=%0d inits=%0d",
             dis_wait, contest, clr_hold, withdrawn, concurrent, fast, slow, inits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
