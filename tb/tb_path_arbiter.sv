// tb_path_arbiter: seven requesters on the conflict graph of
//   path (A+B+D) end, path (B;(C+D);E) end, path (E+F+G) end
// (conflicts rebuilt here from the three event sets). Requesters raise IN at
// random, hold it until acknowledged (or sometimes withdraw it), then drop it
// after a random time. Checked every clock edge:
//   - no two conflicting acks are high together;
//   - an ack rises only for a request that was high;
//   - an ack stays high while its request does and falls one edge after it;
//   - no deliberate wait: a request that has passed its longest delay
//     (ARB_DELAY+1 edges) and meets no conflicting grant is granted now;
//   - both delay settings of the random priority occur (grant 2 edges after
//     the request, and ARB_DELAY+2 edges after it);
//   - every event is granted, and non-conflicting events run concurrently.
module tb_path_arbiter;
  localparam int N = 7, ARB_DELAY = 3;
  localparam logic [N-1:0] P1 = 7'b0001011;   // A B D
  localparam logic [N-1:0] P2 = 7'b0011110;   // B C D E
  localparam logic [N-1:0] P3 = 7'b1110000;   // E F G

  logic clk = 0, rst_n = 0;
  logic nb;
  logic [N-1:0] in_req, ack, ack_prev, in_prev, conf [N];
  int pend [N];
  int hold [N];
  int checks = 0, failures = 0;
  int fast = 0, slow = 0, conc = 0, withdrawn = 0, blocked = 0;
  int grants [N];

  path_arbiter #(.ARB_DELAY(ARB_DELAY)) dut (
    .clk(clk), .rst_n(rst_n), .noise_bit(nb), .in_req(in_req), .ack(ack));

  always #5 clk = ~clk;

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("%0t: %s", $time, m); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < N; e++) begin
      conf[e] = '0;
      if (P1[e]) conf[e] |= P1;
      if (P2[e]) conf[e] |= P2;
      if (P3[e]) conf[e] |= P3;
      conf[e][e] = 1'b0;
      pend[e] = 0; hold[e] = 0; grants[e] = 0;
    end
    in_req = '0; nb = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      nb = 1'($urandom);
      ack_prev = ack;
      in_prev = in_req;
      for (int e = 0; e < N; e++) begin
        if (!in_req[e] && !ack[e]) begin
          if ($urandom_range(0, 3) == 0) in_req[e] = 1;
        end else if (in_req[e] && ack[e]) begin
          if ($urandom_range(0, 2) == 0) in_req[e] = 0;
        end else if (in_req[e] && !ack[e] && $urandom_range(0, 60) == 0) begin
          in_req[e] = 0;
          withdrawn++;
        end
      end
      @(posedge clk);
      #1;
      for (int e = 0; e < N; e++) begin
        int pb;
        pb = pend[e];
        pend[e] = in_req[e] ? pend[e] + 1 : 0;
        check(!(ack[e] && (ack & conf[e]) != '0), $sformatf("conflicting acks %b", ack));
        if (ack[e] && !ack_prev[e]) begin
          check(in_req[e], $sformatf("ack %0d without request", e));
          grants[e]++;
          if (pend[e] == 2) fast++;
          else if (pend[e] == ARB_DELAY + 2) slow++;
        end
        if (ack_prev[e] && in_req[e]) check(ack[e], $sformatf("ack %0d dropped while requested", e));
        if (ack_prev[e] && !in_req[e]) check(!ack[e], $sformatf("ack %0d held without request", e));
        if (in_req[e] && in_prev[e] && pb >= ARB_DELAY + 1 && !ack_prev[e]) begin
          if ((ack_prev & conf[e]) == '0)
            check(ack[e] || (ack & ~ack_prev & conf[e]) != '0,
                  $sformatf("request %0d waits without conflict", e));
          else blocked++;
        end
      end
      if ($countones(ack) >= 2) conc++;
    end
    check(fast > 0 && slow > 0, $sformatf("priority settings seen: fast=%0d slow=%0d", fast, slow));
    check(conc > 0, "no concurrent grants");
    check(withdrawn > 0 && blocked > 0, "no withdrawn or blocked requests");
    for (int e = 0; e < N; e++) check(grants[e] > 20, $sformatf("event %0d granted %0d times", e, grants[e]));
    $display("fast=%0d slow=%0d concurrent=%0d withdrawn=%0d blocked=%0d", fast, slow, conc, withdrawn, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
