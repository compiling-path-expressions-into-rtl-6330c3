// recognizer: keeps track of which events one simple path still allows.
//
// The recognizer is built from the path's syntax tree, one cell per tree
// node: event_cell for each event occurrence, seq_cell for ';', union_cell
// for '+', star_cell for '*'. Cells talk through ENB (this sub-expression may
// start now) and RES (a match of this sub-expression has just completed).
// The root's RES is fed back to its own ENB, which gives the implied outer
// Kleene star of "path ... end". During the first event cycle the root is
// also enabled by an RS flip-flop that INIT sets and End clears. DIS_e is the
// NOR of the ENB inputs of every cell for event e: an event is disabled when
// no occurrence of it is enabled. Events that do not occur in this path are
// never disabled by it.
//
// Interface: NODES is the node array (post-order, see pathexpr_pkg); this
// recognizer uses nodes FIRST..ROOT. tr are the TR lines of the whole event
// alphabet; start_ph/end_ph come from seq_controller. dis is combinational
// from the latched cell states and settles one clk after End loads them.
//
// The cells and the way the grammar's productions connect them follow the
// published construction. Two things are this design's own: the tree is
// placed by a generate loop from a parameter, and RES is carried as a latched
// part plus a constant empty-match flag, which removes the loops that nested
// stars would otherwise form.
module recognizer
  import pathexpr_pkg::*;
#(
  parameter int    N_EV  = 3,
  parameter int    NN    = EX_NN,
  parameter node_t NODES [NN] = EX_NODES,
  parameter int    FIRST = 0,
  parameter int    ROOT  = NN - 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  input  logic            start_ph,
  input  logic            end_ph,
  input  logic [N_EV-1:0] tr,
  output logic [N_EV-1:0] dis
);
  logic enb  [FIRST:ROOT];
  logic rlat [FIRST:ROOT];
  logic nul  [FIRST:ROOT];
  logic init_enb;

  // Root: RES hooked back to ENB, plus the INIT enable for the first cycle.
  sr_ff #(.INIT(1'b1)) u_init_enb (
    .clk (clk), .rst_n (rst_n), .s (init), .r (end_ph && !init), .q (init_enb)
  );
  assign enb[ROOT] = init_enb | rlat[ROOT];

  for (genvar i = FIRST; i <= ROOT; i++) begin : g_node
    localparam node_t ND = NODES[i];
    localparam int    L  = int'(ND.l);
    localparam int    R  = int'(ND.r);
    if (ND.kind == N_EVENT) begin : g_ev
      localparam int EVN = int'(ND.ev);
      event_cell u_cell (
        .clk (clk), .rst_n (rst_n), .init (init),
        .start_ph (start_ph), .end_ph (end_ph),
        .enb (enb[i]), .tr_e (tr[EVN]),
        .res (rlat[i])
      );
      assign nul[i] = 1'b0;
    end else if (ND.kind == N_SEQ) begin : g_seq
      seq_cell u_cell (
        .enb (enb[i]), .l_rlat (rlat[L]), .l_null (nul[L]),
        .r_rlat (rlat[R]), .r_null (nul[R]),
        .l_enb (enb[L]), .r_enb (enb[R]), .rlat (rlat[i]), .nul (nul[i])
      );
    end else if (ND.kind == N_UNION) begin : g_union
      union_cell u_cell (
        .enb (enb[i]), .l_rlat (rlat[L]), .l_null (nul[L]),
        .r_rlat (rlat[R]), .r_null (nul[R]),
        .l_enb (enb[L]), .r_enb (enb[R]), .rlat (rlat[i]), .nul (nul[i])
      );
    end else begin : g_star
      star_cell u_cell (
        .enb (enb[i]), .o_rlat (rlat[L]),
        .o_enb (enb[L]), .rlat (rlat[i]), .nul (nul[i])
      );
    end
  end

  // DIS_e: NOR over the ENB of all cells for event e in this path.
  always_comb begin
    for (int e = 0; e < N_EV; e++) begin
      logic has, any;
      has = 1'b0;
      any = 1'b0;
      for (int i = FIRST; i <= ROOT; i++) begin
        if (NODES[i].kind == N_EVENT && int'(NODES[i].ev) == e) begin
          has = 1'b1;
          any = any | enb[i];
        end
      end
      dis[e] = has & ~any;
    end
  end
endmodule
