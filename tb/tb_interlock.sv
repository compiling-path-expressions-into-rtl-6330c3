// tb_interlock: two clients that each hold their request until granted and
// then release it after a random time. Checks every cycle: never both grants;
// a grant only for a request that was high; a grant is held while its request
// stays high; a lone request is granted after one clock; simultaneous
// requests are won alternately.
module tb_interlock;
  logic clk = 0, rst_n = 0;
  logic ra, rb, ga, gb;
  logic pra, prb, pga, pgb;
  int checks = 0, failures = 0;
  int ties = 0, last_tie_winner = -1, lone = 0;

  interlock dut (.clk(clk), .rst_n(rst_n), .req_a(ra), .req_b(rb), .gnt_a(ga), .gnt_b(gb));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string m);
    failures++;
    $display("%0t: %s", $time, m);
  endtask

  initial begin
    ra = 0; rb = 0;
    pra = 0; prb = 0; pga = 0; pgb = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      pra = ra; prb = rb; pga = ga; pgb = gb;
      // client protocol: raise when idle, drop only after grant
      if (!ra && !ga && $urandom_range(0, 3) == 0) ra = 1;
      else if (ra && ga && $urandom_range(0, 2) == 0) ra = 0;
      if (!rb && !gb && $urandom_range(0, 3) == 0) rb = 1;
      else if (rb && gb && $urandom_range(0, 2) == 0) rb = 0;
      // force some exact ties
      if (i % 50 == 0 && !ra && !rb && !ga && !gb) begin ra = 1; rb = 1; end
      @(posedge clk);
      #1;
      checks++;
      if (ga && gb) fail("both grants high");
      if (ga && !pga && !ra) fail("grant A without request");
      if (gb && !pgb && !rb) fail("grant B without request");
      if (pga && ra && !ga) fail("grant A dropped while requested");
      if (pgb && rb && !gb) fail("grant B dropped while requested");
      if (ra && !rb && !pga && !pgb && !ga) fail("lone request A not granted");
      if (rb && !ra && !pga && !pgb && !gb) fail("lone request B not granted");
      if (ra && rb && !pga && !pgb) begin
        ties++;
        if (ga == gb) fail("tie not resolved");
        if (last_tie_winner == (ga ? 0 : 1)) fail("tie not alternated");
        last_tie_winner = ga ? 0 : 1;
      end
    end
    checks++;
    if (ties < 5) fail("too few simultaneous requests exercised");
    $display("ties=%0d", ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
