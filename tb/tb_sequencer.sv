// tb_sequencer: two sequencers, for path a;(a+b);c end and for
// path (a;(b)*)*;c end, driven through full four-phase TR/TA handshakes with
// random legal events. Checks: TA rises and falls DELAY+1 clock edges after
// TR; only the requested TA moves; DIS, read while all TR and TA are low,
// equals the complement of a hand-written automaton's allowed set and stays
// stable while the sequencer is idle.
module tb_sequencer;
  import pathexpr_pkg::*;
  localparam int DELAY = 4;
  localparam node_t X2 [7] = '{ev_node(0), ev_node(1), star_node(1), seq_node(0, 2),
                               star_node(3), ev_node(2), seq_node(4, 5)};

  logic clk = 0, rst_n = 0;
  logic [2:0] tr [2];
  logic [2:0] ta [2];
  logic [2:0] dis [2];
  int state [2];
  int checks = 0, failures = 0;

  sequencer #(.N_EV(3), .DELAY(DELAY)) s0 (
    .clk, .rst_n, .init(1'b0), .tr(tr[0]), .ta(ta[0]), .dis(dis[0]));
  sequencer #(.N_EV(3), .NN(7), .NODES(X2), .DELAY(DELAY)) s1 (
    .clk, .rst_n, .init(1'b0), .tr(tr[1]), .ta(ta[1]), .dis(dis[1]));

  always #5 clk = ~clk;

  function automatic logic [2:0] allowed(int x, int s);
    if (x == 0) return (s == 0) ? 3'b001 : (s == 1) ? 3'b011 : 3'b100;
    else        return (s == 0) ? 3'b101 : 3'b111;
  endfunction

  function automatic int next_state(int x, int s, int e);
    if (x == 0) return (s == 0) ? 1 : (s == 1) ? 2 : 0;
    else        return (e == 2) ? 0 : 1;
  endfunction

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("%0t: %s", $time, m); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ev [2];
    int lat;
    tr[0] = '0; tr[1] = '0; state[0] = 0; state[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      #1;
      for (int x = 0; x < 2; x++)
        check(dis[x] == ~allowed(x, state[x]),
              $sformatf("S%0d state %0d dis=%b", x, state[x], dis[x]));
      for (int x = 0; x < 2; x++) begin
        logic [2:0] m;
        m = allowed(x, state[x]);
        do ev[x] = $urandom_range(0, 2); while (!m[ev[x]]);
      end
      @(negedge clk);
      check(dis[0] == ~allowed(0, state[0]) && dis[1] == ~allowed(1, state[1]), "DIS not stable while idle");
      tr[0] = 3'(1 << ev[0]);
      tr[1] = 3'(1 << ev[1]);
      lat = 0;
      do begin @(posedge clk); #1; lat++; end while (ta[0] == '0 && lat < 50);
      check(lat == DELAY + 1, $sformatf("TA rise latency %0d", lat));
      check(ta[0] == tr[0] && ta[1] == tr[1], "TA differs from TR");
      repeat ($urandom_range(0, 4)) @(posedge clk);
      @(negedge clk);
      tr[0] = '0;
      tr[1] = '0;
      lat = 0;
      do begin @(posedge clk); #1; lat++; end while (ta[0] != '0 && lat < 50);
      check(lat == DELAY + 1, $sformatf("TA fall latency %0d", lat));
      check(ta[1] == '0, "TA of second sequencer still high");
      for (int x = 0; x < 2; x++) state[x] = next_state(x, state[x], ev[x]);
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
