// sequencer: enforces one simple path expression on a set of events.
//
// The outside world runs a four-phase TR/TA handshake per event and may raise
// tr[e] only while dis[e] and all ta are low, and only one TR at a time. The
// controller turns TR into TA after a fixed delay and generates the Start and
// End phases; the recognizer records the event during Start/End and then
// updates dis. Between handshakes (all TR and TA low) dis[e] is low exactly
// for the events that may come next in the path.
//
// Timing: ta[e] rises DELAY+1 clk edges after tr[e] rises and falls DELAY+1
// edges after tr[e] falls; dis settles one edge after End starts, well
// before ta falls. init re-initialises
// the recognizer (synchronous), as does rst_n.
module sequencer
  import pathexpr_pkg::*;
#(
  parameter int    N_EV  = 3,
  parameter int    NN    = EX_NN,
  parameter node_t NODES [NN] = EX_NODES,
  parameter int    FIRST = 0,
  parameter int    ROOT  = NN - 1,
  parameter int    DELAY = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  input  logic [N_EV-1:0] tr,
  output logic [N_EV-1:0] ta,
  output logic [N_EV-1:0] dis
);
  logic start_ph, end_ph;

  seq_controller #(.N_EV(N_EV), .DELAY(DELAY)) u_ctrl (
    .clk (clk), .rst_n (rst_n), .tr (tr), .ta (ta),
    .start_ph (start_ph), .end_ph (end_ph)
  );

  recognizer #(.N_EV(N_EV), .NN(NN), .NODES(NODES), .FIRST(FIRST), .ROOT(ROOT)) u_rec (
    .clk (clk), .rst_n (rst_n), .init (init),
    .start_ph (start_ph), .end_ph (end_ph), .tr (tr), .dis (dis)
  );
endmodule
