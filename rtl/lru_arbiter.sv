// lru_arbiter: deterministic least-recently-served arbiter over the conflict
// graph of a multiple path expression. It is an alternative to path_arbiter
// and has the same request/acknowledge behaviour.
//
// Every event e has a priority number prio[e] from 0 to K-1. It counts how
// often e was blocked. A block is a rising acknowledge of a conflicting event
// while e was requesting and not acknowledged. When e itself is acknowledged,
// its priority drops back to 0. Priority decides through delay: K switchable
// delay lines of LINE_DELAY clk cycles each sit in series in front of every
// input. Each block switches one more line off (bypasses it), and an
// acknowledge switches them all on again. A request with priority p therefore
// becomes visible (K-p)*LINE_DELAY cycles after it rises. Of two conflicting
// requests that rise together, the one blocked more often is seen first and
// wins.
//
// Behind the delay lines sits the same mutual-exclusion core as in
// path_arbiter:
//   - it keeps held grants while their requests stay high;
//   - it grants every visible request that meets no conflicting grant;
//   - it settles same-cycle ties in index order;
//   - the acknowledge is registered.
//
// The priority counting and the k delay lines per input follow the published
// LRU realisation. The one-cycle line delay, the saturation at K-1 and the
// rule that simultaneous blocks by several neighbours count once are this
// design's own.
//
// Timing: ack[e] rises (K-prio[e])*LINE_DELAY+2 clk edges after in_req[e]
// rises, if nothing conflicting holds a grant. It falls one edge after
// in_req[e] falls. With the defaults, that is 3 edges for the most-blocked
// event and K+2 edges for one with priority 0.
module lru_arbiter
  import pathexpr_pkg::*;
#(
  parameter int N_EV       = DEF_N_EV,
  parameter logic [N_EV-1:0][N_EV-1:0] CONFLICT = DEF_CONFLICT,
  parameter int K          = N_EV,   // priority levels = delay lines per input
  parameter int LINE_DELAY = 1       // clk cycles per delay line
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_EV-1:0] in_req,
  output logic [N_EV-1:0] ack
);
  localparam int MAXD = K * LINE_DELAY;
  localparam int CW   = $clog2(MAXD + 1);
  localparam int PW   = $clog2(K + 1);

  typedef logic [PW-1:0] prio_t;

  logic [N_EV-1:0] in_prev;
  prio_t           prio     [N_EV];
  logic [CW-1:0]   wait_cnt [N_EV];
  logic [N_EV-1:0] visible;
  logic [N_EV-1:0] grant;
  logic [N_EV-1:0] new_grant;

  // Delay from the lines still switched on.
  function automatic logic [CW-1:0] line_delay(prio_t p);
    return CW'((K - int'(p)) * LINE_DELAY);
  endfunction

  always_comb begin
    for (int e = 0; e < N_EV; e++)
      visible[e] = in_req[e] && in_prev[e] && (wait_cnt[e] >= line_delay(prio[e]));
  end

  // Held grants first, then new grants in index order.
  always_comb begin
    grant = ack & in_req;
    for (int e = 0; e < N_EV; e++)
      if (visible[e] && !grant[e] && ((grant & CONFLICT[e]) == '0))
        grant[e] = 1'b1;
  end

  assign new_grant = grant & ~ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_prev <= '0;
      ack     <= '0;
      for (int e = 0; e < N_EV; e++) begin
        prio[e]     <= '0;
        wait_cnt[e] <= '0;
      end
    end else begin
      in_prev <= in_req;
      ack     <= grant;
      for (int e = 0; e < N_EV; e++) begin
        if (in_req[e] && !in_prev[e])
          wait_cnt[e] <= '0;
        else if (in_req[e] && wait_cnt[e] != CW'(MAXD))
          wait_cnt[e] <= wait_cnt[e] + 1'b1;

        if (new_grant[e])
          prio[e] <= '0;
        else if (in_req[e] && !grant[e] && ((new_grant & CONFLICT[e]) != '0)
                 && prio[e] != prio_t'(K - 1))
          prio[e] <= prio[e] + 1'b1;
      end
    end
  end

  for (genvar e = 0; e < N_EV; e++) begin : g_chk
    mutex : assert property (@(posedge clk) disable iff (!rst_n)
      !(ack[e] && ((ack & CONFLICT[e]) != '0)));
    ack_needs_in : assert property (@(posedge clk) disable iff (!rst_n)
      $rose(ack[e]) |-> $past(in_req[e]));
  end
endmodule
