// pathexpr_top: synchronizer compiled for the multiple path expression
//   path (A+B+D) end, path (B;(C+D);E) end, path (E+F+G) end
// with events A..G on bits 0..6 of req and ack.
//
// Each event runs a four-phase req/ack handshake with its client. The first
// path lets at most one of A, B, D run at a time; the second forces the
// order B, then C or D, then E, over and over; the third lets at most one of
// E, F, G run at a time. Events that share no path (for instance A and C)
// may run concurrently. noise_bit is the digitised output of an external
// random source that drives the arbiter's fairness; init re-initialises all
// sequencers and handshake state. Everything is sampled on clk. LRU=1
// swaps the probabilistic arbiter for the deterministic least-recently-served
// one; noise_bit is then unused.
module pathexpr_top
  import pathexpr_pkg::*;
#(
  parameter int DELAY     = 4,
  parameter int ARB_DELAY = 3,
  parameter bit LRU       = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                init,
  input  logic                noise_bit,
  input  logic [DEF_N_EV-1:0] req,
  output logic [DEF_N_EV-1:0] ack
);
  synchronizer #(
    .N_EV (DEF_N_EV), .N_PATH (DEF_N_PATH), .NN (DEF_NN), .NODES (DEF_NODES),
    .FIRST (DEF_FIRST), .ROOT (DEF_ROOT), .DELAY (DELAY), .ARB_DELAY (ARB_DELAY),
    .LRU (LRU)
  ) u_sync (
    .clk (clk), .rst_n (rst_n), .init (init), .noise_bit (noise_bit),
    .req (req), .ack (ack)
  );
endmodule
