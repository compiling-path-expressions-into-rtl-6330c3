// tb_workloads: the synchronizer compiled for four further example
// expressions, all over three events (numbers in brackets):
//   W0 readers/writers  path R1+W end, path R2+W end     (R1=0 R2=1 W=2)
//   W1 two sequences    path A;B end,  path A;C end      (A=0 B=1 C=2)
//   W2 single path      path (A;C)+(B;A) end             (A=0 B=1 C=2)
//   W3 single path      path (A;C)+(B;(A+B)) end         (A=0 B=1 C=2)
// Clients request every event as often as the handshake allows. Each
// acknowledged event is checked against hand-written automata of the paths;
// events of one path must not overlap. The test also requires: the two
// readers of W0 overlap in time while the writer still runs; B and C of W1
// overlap (they share no path); and C is not starved in W2 and W3, the two
// expressions on which a deterministic oblivious arbiter can starve C.
// W4 and W5 repeat W0 and W3 with the least-recently-served arbiter in place
// of the probabilistic one, for comparison. All their sequencing checks
// apply. W5's C is only reported, because the deterministic arbiter is
// allowed to starve it.
module tb_workloads;
  import pathexpr_pkg::*;
  localparam int N = 3, DELAY = 4, ARB_DELAY = 3, NW = 6;

  localparam node_t N0 [6] = '{ev_node(0), ev_node(2), union_node(0, 1),
                               ev_node(1), ev_node(2), union_node(3, 4)};
  localparam node_t N1 [6] = '{ev_node(0), ev_node(1), seq_node(0, 1),
                               ev_node(0), ev_node(2), seq_node(3, 4)};
  localparam node_t N2 [7] = '{ev_node(0), ev_node(2), seq_node(0, 1),
                               ev_node(1), ev_node(0), seq_node(3, 4), union_node(2, 5)};
  localparam node_t N3 [9] = '{ev_node(0), ev_node(2), seq_node(0, 1), ev_node(1),
                               ev_node(0), ev_node(1), union_node(4, 5), seq_node(3, 6),
                               union_node(2, 7)};
  localparam int F2 [2] = '{0, 3};
  localparam int R2 [2] = '{2, 5};
  localparam int F1 [1] = '{0};
  localparam int R1a [1] = '{6};
  localparam int R1b [1] = '{8};

  logic clk = 0, rst_n = 0;
  logic nb;
  logic [N-1:0] req [NW];
  logic [N-1:0] ack [NW];
  logic [N-1:0] ack_prev [NW];
  int state [NW][2];
  int runs [NW][N];
  int checks = 0, failures = 0;
  int readers_overlap = 0, bc_overlap = 0;

  synchronizer #(.N_EV(N), .N_PATH(2), .NN(6), .NODES(N0), .FIRST(F2), .ROOT(R2),
                 .DELAY(DELAY), .ARB_DELAY(ARB_DELAY)) w0 (
    .clk, .rst_n, .init(1'b0), .noise_bit(nb), .req(req[0]), .ack(ack[0]));
  synchronizer #(.N_EV(N), .N_PATH(2), .NN(6), .NODES(N1), .FIRST(F2), .ROOT(R2),
                 .DELAY(DELAY), .ARB_DELAY(ARB_DELAY)) w1 (
    .clk, .rst_n, .init(1'b0), .noise_bit(nb), .req(req[1]), .ack(ack[1]));
  synchronizer #(.N_EV(N), .N_PATH(1), .NN(7), .NODES(N2), .FIRST(F1), .ROOT(R1a),
                 .DELAY(DELAY), .ARB_DELAY(ARB_DELAY)) w2 (
    .clk, .rst_n, .init(1'b0), .noise_bit(nb), .req(req[2]), .ack(ack[2]));
  synchronizer #(.N_EV(N), .N_PATH(1), .NN(9), .NODES(N3), .FIRST(F1), .ROOT(R1b),
                 .DELAY(DELAY), .ARB_DELAY(ARB_DELAY)) w3 (
    .clk, .rst_n, .init(1'b0), .noise_bit(nb), .req(req[3]), .ack(ack[3]));
  synchronizer #(.N_EV(N), .N_PATH(2), .NN(6), .NODES(N0), .FIRST(F2), .ROOT(R2),
                 .DELAY(DELAY), .LRU(1'b1)) w4 (
    .clk, .rst_n, .init(1'b0), .noise_bit(nb), .req(req[4]), .ack(ack[4]));
  synchronizer #(.N_EV(N), .N_PATH(1), .NN(9), .NODES(N3), .FIRST(F1), .ROOT(R1b),
                 .DELAY(DELAY), .LRU(1'b1)) w5 (
    .clk, .rst_n, .init(1'b0), .noise_bit(nb), .req(req[5]), .ack(ack[5]));

  always #5 clk = ~clk;

  // Expression used by instance w.
  function automatic int base(int w);
    return (w == 4) ? 0 : (w == 5) ? 3 : w;
  endfunction

  function automatic int n_paths(int w);
    return (base(w) < 2) ? 2 : 1;
  endfunction

  function automatic logic [N-1:0] members(int w, int p);
    case (base(w))
      0: return (p == 0) ? 3'b101 : 3'b110;
      1: return (p == 0) ? 3'b011 : 3'b101;
      default: return 3'b111;
    endcase
  endfunction

  function automatic logic [N-1:0] allowed(int w, int p, int s);
    case (base(w))
      0: return members(0, p);
      1: return (s == 0) ? 3'b001 : ((p == 0) ? 3'b010 : 3'b100);
      2: return (s == 0) ? 3'b011 : (s == 1) ? 3'b100 : 3'b001;
      default: return (s == 0) ? 3'b011 : (s == 1) ? 3'b100 : 3'b011;
    endcase
  endfunction

  function automatic int next_state(int w, int s, int e);
    case (base(w))
      0: return 0;
      1: return 1 - s;
      default: return (s == 0) ? ((e == 0) ? 1 : 2) : 0;
    endcase
  endfunction

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("%0t: %s", $time, m); end
  endtask

  always @(posedge clk) if (rst_n) begin
    #1;
    for (int w = 0; w < NW; w++) begin
      for (int e = 0; e < N; e++) if (ack[w][e] && !ack_prev[w][e]) begin
        for (int p = 0; p < n_paths(w); p++) if (members(w, p)[e]) begin
          check(allowed(w, p, state[w][p])[e],
                $sformatf("W%0d: event %0d violates path %0d in state %0d", w, e, p, state[w][p]));
          state[w][p] = next_state(w, state[w][p], e);
        end
        runs[w][e]++;
      end
      for (int p = 0; p < n_paths(w); p++)
        check($countones(ack[w] & members(w, p)) <= 1, $sformatf("W%0d: path %0d overlap", w, p));
      ack_prev[w] = ack[w];
    end
    if (ack[0][0] && ack[0][1]) readers_overlap++;
    if (ack[1][1] && ack[1][2]) bc_overlap++;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nb = 0;
    for (int w = 0; w < NW; w++) begin
      req[w] = '0; ack_prev[w] = '0; state[w][0] = 0; state[w][1] = 0;
      for (int e = 0; e < N; e++) runs[w][e] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40000; i++) begin
      @(negedge clk);
      nb = 1'($urandom);
      for (int w = 0; w < NW; w++)
        for (int e = 0; e < N; e++) begin
          if (!req[w][e] && !ack[w][e]) req[w][e] = 1;
          else if (req[w][e] && ack[w][e] && $urandom_range(0, 3) == 0) req[w][e] = 0;
        end
    end
    for (int w = 0; w < NW; w++) for (int e = 0; e < N; e++) if (!(w == 5 && e == 2))
      check(runs[w][e] > 10, $sformatf("W%0d: event %0d ran %0d times", w, e, runs[w][e]));
    check(readers_overlap > 0, "readers never overlapped");
    check(bc_overlap > 0, "B and C never overlapped");
    for (int w = 0; w < NW; w++)
      $display("W%0d runs = %0d %0d %0d", w, runs[w][0], runs[w][1], runs[w][2]);
    $display("readers_overlap=%0d bc_overlap=%0d", readers_overlap, bc_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
