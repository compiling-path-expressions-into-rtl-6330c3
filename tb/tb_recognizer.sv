// tb_recognizer: four recognizers driven with hand-made Start/End phases and
// random legal event sequences. After each event the DIS lines are compared
// with the allowed-next-event sets of a small automaton written by hand for
// each expression (events a=0, b=1, c=2):
//   R0  path a;(a+b);c end        states {a} -> {a,b} -> {c} -> {a}
//   R1  path ((a)*;(b)*);c end    {a,b,c} after a or c; {b,c} after b
//   R2  path (a;(b)*)*;c end      {a,c} at start and after c; {a,b,c} after a or b
//   R3  path (((a)*;(b)*)*);c end every event always allowed (nested stars)
module tb_recognizer;
  import pathexpr_pkg::*;

  localparam node_t X1 [7] = '{ev_node(0), star_node(0), ev_node(1), star_node(2),
                               seq_node(1, 3), ev_node(2), seq_node(4, 5)};
  localparam node_t X2 [7] = '{ev_node(0), ev_node(1), star_node(1), seq_node(0, 2),
                               star_node(3), ev_node(2), seq_node(4, 5)};
  localparam node_t X3 [8] = '{ev_node(0), star_node(0), ev_node(1), star_node(2),
                               seq_node(1, 3), star_node(4), ev_node(2), seq_node(5, 6)};

  logic clk = 0, rst_n = 0;
  logic init, st, en;
  logic [2:0] tr [4];
  logic [2:0] dis [4];
  int state [4];
  int checks = 0, failures = 0;
  int seen_ev [4][3];

  recognizer #(.N_EV(3))                           r0 (.clk, .rst_n, .init, .start_ph(st), .end_ph(en), .tr(tr[0]), .dis(dis[0]));
  recognizer #(.N_EV(3), .NN(7), .NODES(X1))       r1 (.clk, .rst_n, .init, .start_ph(st), .end_ph(en), .tr(tr[1]), .dis(dis[1]));
  recognizer #(.N_EV(3), .NN(7), .NODES(X2))       r2 (.clk, .rst_n, .init, .start_ph(st), .end_ph(en), .tr(tr[2]), .dis(dis[2]));
  recognizer #(.N_EV(3), .NN(8), .NODES(X3))       r3 (.clk, .rst_n, .init, .start_ph(st), .end_ph(en), .tr(tr[3]), .dis(dis[3]));

  always #5 clk = ~clk;

  // allowed-next-event mask of expression x in state s
  function automatic logic [2:0] allowed(int x, int s);
    case (x)
      0: return (s == 0) ? 3'b001 : (s == 1) ? 3'b011 : 3'b100;
      1: return (s == 0) ? 3'b111 : 3'b110;
      2: return (s == 0) ? 3'b101 : 3'b111;
      default: return 3'b111;
    endcase
  endfunction

  function automatic int next_state(int x, int s, int e);
    case (x)
      0: return (s == 0) ? 1 : (s == 1) ? 2 : 0;
      1: return (e == 0) ? 0 : (e == 1) ? 1 : 0;
      2: return (e == 2) ? 0 : 1;
      default: return 0;
    endcase
  endfunction

  task automatic check_dis(string when);
    for (int x = 0; x < 4; x++) begin
      checks++;
      if (dis[x] !== ~allowed(x, state[x])) begin
        failures++;
        $display("%0t: %s: R%0d state %0d dis=%b expected %b", $time, when, x, state[x],
                 dis[x], ~allowed(x, state[x]));
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ev [4];
    init = 0; st = 0; en = 0;
    for (int x = 0; x < 4; x++) begin tr[x] = '0; state[x] = 0; end
    for (int x = 0; x < 4; x++) for (int e = 0; e < 3; e++) seen_ev[x][e] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check_dis("after reset");
    for (int i = 0; i < 400; i++) begin
      // one event cycle: choose a legal event for each recognizer
      for (int x = 0; x < 4; x++) begin
        logic [2:0] m;
        m = allowed(x, state[x]);
        do ev[x] = $urandom_range(0, 2); while (!m[ev[x]]);
        seen_ev[x][ev[x]]++;
      end
      @(negedge clk);
      for (int x = 0; x < 4; x++) tr[x] = 3'(1 << ev[x]);
      st = 1;
      repeat (2) @(negedge clk);
      st = 0;
      @(negedge clk);
      for (int x = 0; x < 4; x++) tr[x] = '0;
      en = 1;
      repeat (2) @(negedge clk);
      en = 0;
      for (int x = 0; x < 4; x++) state[x] = next_state(x, state[x], ev[x]);
      @(negedge clk);
      check_dis("after event");
      // occasionally re-initialise everything
      if (i % 97 == 96) begin
        init = 1;
        @(negedge clk);
        init = 0;
        for (int x = 0; x < 4; x++) state[x] = 0;
        @(negedge clk);
        check_dis("after init");
      end
    end
    for (int x = 0; x < 4; x++) for (int e = 0; e < 3; e++) begin
      checks++;
      if (seen_ev[x][e] == 0) begin failures++; $display("R%0d never saw event %0d", x, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
