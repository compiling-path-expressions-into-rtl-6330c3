// synchronizer: enforces a multiple path expression on a set of events.
//
// Each event e has a request req[e] and an acknowledge ack[e] that follow a
// four-phase handshake with the outside world: raise req, wait for ack,
// perform the event, lower req, wait for ack to fall. The event takes place
// while req and ack are both high. The synchronizer acknowledges only event
// sequences that every simple path of the expression allows, and lets events
// that share no path proceed at the same time.
//
// Structure (one sequencer per path, per-event gates, one arbiter):
//   g_e   = req_e AND no sequencer holding e asserts DIS_e   (main NOR)
//   o_e   = g_e OR ack_e            (keeps the request up once acknowledged)
//   IN_e  = o_e AND NOT CLR_e AND NOT CLR of every conflicting event
//   ack   = arbiter(IN)             (no two events of one path together)
//   TR_e  = ack_e, sent to every sequencer whose path holds e
//   C_e   = C-element over the TA_e of those sequencers
//   CLR_e = SR flip-flop, set by C_e AND NOT req_e, reset by NOT C_e
// CLR_e rises once all sequencers have seen the event and the outside world
// has finished it; it pulls IN_e (and the IN of every conflicting event)
// low, which lowers ack_e and TR_e. When all TA_e have fallen again, CLR_e
// falls and the cycle is complete. Holding conflicting IN low while CLR_e is
// high keeps any event of the same paths out until the sequencers have
// updated their DIS lines. All CLR flip-flops start high, as do those after
// init.
//
// Parameters: the node array of all paths (see pathexpr_pkg), with each
// path's first and root node; DELAY is the sequencers' controller delay and
// ARB_DELAY the arbiter's switched delay, both in clk cycles. LRU selects
// the arbiter. With 0, the default, it is the probabilistic path_arbiter,
// which draws random priorities from noise_bit. With 1, it is the
// deterministic lru_arbiter, and noise_bit is ignored. The gate network
// follows the published synchronizer; the clocked emulation of its state
// elements is this design's own.
module synchronizer
  import pathexpr_pkg::*;
#(
  parameter int    N_EV      = DEF_N_EV,
  parameter int    N_PATH    = DEF_N_PATH,
  parameter int    NN        = DEF_NN,
  parameter node_t NODES [NN] = DEF_NODES,
  parameter int    FIRST [N_PATH] = DEF_FIRST,
  parameter int    ROOT  [N_PATH] = DEF_ROOT,
  parameter int    DELAY     = 4,
  parameter int    ARB_DELAY = 3,
  parameter bit    LRU       = 1'b0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  input  logic            noise_bit,
  input  logic [N_EV-1:0] req,
  output logic [N_EV-1:0] ack
);
  // Events held by path p.
  function automatic logic [N_EV-1:0] members(int p);
    logic [N_EV-1:0] m = '0;
    for (int i = FIRST[p]; i <= ROOT[p]; i++)
      if (NODES[i].kind == N_EVENT) m = m | (N_EV'(1) << NODES[i].ev);
    return m;
  endfunction

  function automatic logic [N_EV-1:0][N_EV-1:0] conflicts();
    logic [N_EV-1:0][N_EV-1:0] c = '0;
    for (int p = 0; p < N_PATH; p++)
      for (int e = 0; e < N_EV; e++)
        if (members(p)[e]) c[e] = c[e] | members(p);
    for (int e = 0; e < N_EV; e++) c[e][e] = 1'b0;
    return c;
  endfunction

  function automatic int n_holders(int e);
    int n = 0;
    for (int p = 0; p < N_PATH; p++) if (members(p)[e]) n++;
    return n;
  endfunction

  localparam logic [N_EV-1:0][N_EV-1:0] CONFLICT = conflicts();

  logic [N_EV-1:0] ta   [N_PATH];
  logic [N_EV-1:0] dis  [N_PATH];
  logic [N_EV-1:0] disabled, in_req, clr, c_out;

  // One sequencer per simple path; TR_e is ack_e for the events it holds.
  for (genvar p = 0; p < N_PATH; p++) begin : g_seq
    localparam logic [N_EV-1:0] MEM = members(p);
    sequencer #(
      .N_EV (N_EV), .NN (NN), .NODES (NODES),
      .FIRST (FIRST[p]), .ROOT (ROOT[p]), .DELAY (DELAY)
    ) u_seq (
      .clk (clk), .rst_n (rst_n), .init (init),
      .tr (ack & MEM), .ta (ta[p]), .dis (dis[p])
    );
  end

  always_comb begin
    disabled = '0;
    for (int p = 0; p < N_PATH; p++) disabled = disabled | dis[p];
  end

  for (genvar e = 0; e < N_EV; e++) begin : g_ev
    localparam int NH = n_holders(e);
    logic [NH-1:0] ta_e;
    logic          g, o;

    always_comb begin
      int k;
      k = 0;
      ta_e = '0;
      for (int p = 0; p < N_PATH; p++)
        if (members(p)[e]) begin
          ta_e[k] = ta[p][e];
          k++;
        end
    end

    c_element #(.N(NH)) u_c (.clk (clk), .rst_n (rst_n), .a (ta_e), .y (c_out[e]));

    sr_ff #(.INIT(1'b1)) u_clr (
      .clk (clk), .rst_n (rst_n),
      .s   (init || (c_out[e] && !req[e])),
      .r   (!init && !c_out[e]),
      .q   (clr[e])
    );

    assign g         = req[e] && !disabled[e];
    assign o         = g || ack[e];
    assign in_req[e] = o && !clr[e] && ((clr & CONFLICT[e]) == '0);
  end

  if (LRU) begin : g_lru
    lru_arbiter #(.N_EV (N_EV), .CONFLICT (CONFLICT)) u_arb (
      .clk (clk), .rst_n (rst_n), .in_req (in_req), .ack (ack)
    );
  end else begin : g_prob
    path_arbiter #(.N_EV (N_EV), .CONFLICT (CONFLICT), .ARB_DELAY (ARB_DELAY)) u_arb (
      .clk (clk), .rst_n (rst_n), .noise_bit (noise_bit), .in_req (in_req), .ack (ack)
    );
  end
endmodule
