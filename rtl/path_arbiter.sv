// path_arbiter: probabilistic arbiter over the conflict graph of a multiple
// path expression.
//
// Two events conflict when some path contains both (CONFLICT, one row per
// event). The arbiter raises ack[e] for requests in_req[e] so that no two
// conflicting acks are ever high together, holds ack[e] for as long as
// in_req[e] stays high, and lowers it one clk after in_req[e] falls. It never
// waits deliberately: whenever a request is visible and conflicts with no
// grant, it is granted.
//
// Fairness comes from a digitally switched delay in front of every input.
// When in_req[e] rises, a 1-bit priority register takes a fresh random bit
// from the oracle shift register. Priority 1 bypasses the delay; priority 0
// hides the request for ARB_DELAY clk cycles, long enough for any
// undelayed conflicting request to win. So any maximally parallel set of
// requests (an independent set of the conflict graph that cannot be
// extended) is chosen with non-zero probability: when exactly its members
// draw priority 1.
//
// Requests that become visible in the same cycle are resolved in index order
// (lowest event number first); this stands in for the metastability
// resolution of the cross-coupled mutual-exclusion gates. The delay elements,
// the per-input random register and the oracle follow the published arbiter;
// the clocked greedy core is this design's own.
//
// Timing: ack[e] rises 2 clk edges after in_req[e] rises with priority 1, or
// ARB_DELAY+2 edges after it with priority 0, if nothing conflicting holds a
// grant.
module path_arbiter
  import pathexpr_pkg::*;
#(
  parameter int N_EV      = DEF_N_EV,
  parameter logic [N_EV-1:0][N_EV-1:0] CONFLICT = DEF_CONFLICT,
  parameter int ARB_DELAY = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            noise_bit,
  input  logic [N_EV-1:0] in_req,
  output logic [N_EV-1:0] ack
);
  localparam int CW = $clog2(ARB_DELAY + 1);

  logic [N_EV-1:0] rnd;          // parallel oracle bits
  logic [N_EV-1:0] in_prev;
  logic [N_EV-1:0] prio;         // 1: delay bypassed
  logic [CW-1:0]   wait_cnt [N_EV];
  logic [N_EV-1:0] visible;
  logic [N_EV-1:0] grant;

  oracle_shift_register #(.N(N_EV)) u_oracle (
    .clk (clk), .rst_n (rst_n), .noise_bit (noise_bit), .bits (rnd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_prev <= '0;
      prio    <= '0;
      for (int e = 0; e < N_EV; e++) wait_cnt[e] <= '0;
    end else begin
      in_prev <= in_req;
      for (int e = 0; e < N_EV; e++) begin
        if (in_req[e] && !in_prev[e]) begin
          prio[e]     <= rnd[e];
          wait_cnt[e] <= '0;
        end else if (in_req[e] && wait_cnt[e] != CW'(ARB_DELAY)) begin
          wait_cnt[e] <= wait_cnt[e] + 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int e = 0; e < N_EV; e++)
      visible[e] = in_req[e] && in_prev[e] && (prio[e] || wait_cnt[e] == CW'(ARB_DELAY));
  end

  // Held grants first, then new grants in index order.
  always_comb begin
    grant = ack & in_req;
    for (int e = 0; e < N_EV; e++)
      if (visible[e] && !grant[e] && ((grant & CONFLICT[e]) == '0))
        grant[e] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack <= '0;
    else        ack <= grant;
  end

  // Arbiter safety: conflicting events are never acknowledged together, and
  // an acknowledge is only raised for a pending request.
  for (genvar e = 0; e < N_EV; e++) begin : g_chk
    mutex : assert property (@(posedge clk) disable iff (!rst_n)
      !(ack[e] && ((ack & CONFLICT[e]) != '0)));
    ack_needs_in : assert property (@(posedge clk) disable iff (!rst_n)
      $rose(ack[e]) |-> $past(in_req[e]));
  end
endmodule
