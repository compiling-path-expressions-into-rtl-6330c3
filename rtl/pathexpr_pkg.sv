// pathexpr_pkg: types and constants shared by the path-expression circuits.
//
// A simple path expression "path R end" is held as its syntax tree: an array
// of nodes in post-order, so that every node's operands have lower indices
// than the node itself and the root is the last node of the path. A node is
// an event leaf, a ';' (sequence), a '+' (exclusive choice) or a '*' (Kleene
// star, one operand in field l). Several paths of a multiple path expression
// share one node array; each path owns a contiguous index range and all
// operand indices are global.
//
// The default configuration is the multiple path expression whose conflict
// graph the source publication draws:
//   path (A+B+D) end, path (B;(C+D);E) end, path (E+F+G) end
// with events A..G numbered 0..6.
package pathexpr_pkg;

  localparam int IDX_W = 8;   // node index width (up to 256 nodes)
  localparam int EV_W  = 8;   // event number width (up to 256 events)

  typedef enum logic [1:0] {
    N_EVENT = 2'd0,
    N_SEQ   = 2'd1,
    N_UNION = 2'd2,
    N_STAR  = 2'd3
  } node_kind_t;

  typedef struct packed {
    node_kind_t       kind;
    logic [EV_W-1:0]  ev;   // event number, N_EVENT only
    logic [IDX_W-1:0] l;    // left operand (the operand of '*')
    logic [IDX_W-1:0] r;    // right operand
  } node_t;

  function automatic node_t ev_node(int e);
    return '{kind: N_EVENT, ev: EV_W'(e), l: '0, r: '0};
  endfunction
  function automatic node_t seq_node(int a, int b);
    return '{kind: N_SEQ, ev: '0, l: IDX_W'(a), r: IDX_W'(b)};
  endfunction
  function automatic node_t union_node(int a, int b);
    return '{kind: N_UNION, ev: '0, l: IDX_W'(a), r: IDX_W'(b)};
  endfunction
  function automatic node_t star_node(int a);
    return '{kind: N_STAR, ev: '0, l: IDX_W'(a), r: '0};
  endfunction

  // ---- Default multiple path expression (3 paths, 7 events, 17 nodes) ----
  localparam int EV_A = 0, EV_B = 1, EV_C = 2, EV_D = 3, EV_E = 4, EV_F = 5, EV_G = 6;
  localparam int DEF_N_EV   = 7;
  localparam int DEF_N_PATH = 3;
  localparam int DEF_NN     = 17;

  localparam node_t DEF_NODES [DEF_NN] = '{
    // path (A+B+D) end : nodes 0..4, root 4
    ev_node(EV_A), ev_node(EV_B), union_node(0, 1), ev_node(EV_D), union_node(2, 3),
    // path (B;(C+D);E) end : nodes 5..11, root 11
    ev_node(EV_B), ev_node(EV_C), ev_node(EV_D), union_node(6, 7), seq_node(5, 8),
    ev_node(EV_E), seq_node(9, 10),
    // path (E+F+G) end : nodes 12..16, root 16
    ev_node(EV_E), ev_node(EV_F), union_node(12, 13), ev_node(EV_G), union_node(14, 15)
  };
  localparam int DEF_FIRST [DEF_N_PATH] = '{0, 5, 12};
  localparam int DEF_ROOT  [DEF_N_PATH] = '{4, 11, 16};

  // ---- Single-path example: path a;(a+b);c end, events a=0 b=1 c=2 ----
  localparam int EX_NN = 7;
  localparam node_t EX_NODES [EX_NN] = '{
    ev_node(0), ev_node(0), ev_node(1), union_node(1, 2), ev_node(2), seq_node(3, 4),
    seq_node(0, 5)
  };

  // Events of path p of the default expression, as a bit mask.
  function automatic logic [DEF_N_EV-1:0] def_members(int p);
    logic [DEF_N_EV-1:0] m = '0;
    for (int i = DEF_FIRST[p]; i <= DEF_ROOT[p]; i++)
      if (DEF_NODES[i].kind == N_EVENT) m = m | (DEF_N_EV'(1) << DEF_NODES[i].ev);
    return m;
  endfunction

  // Conflict graph: two distinct events conflict when some path holds both.
  function automatic logic [DEF_N_EV-1:0][DEF_N_EV-1:0] def_conflict();
    logic [DEF_N_EV-1:0][DEF_N_EV-1:0] c = '0;
    for (int p = 0; p < DEF_N_PATH; p++) begin
      logic [DEF_N_EV-1:0] m = def_members(p);
      for (int e = 0; e < DEF_N_EV; e++)
        if (m[e]) c[e] = c[e] | m;
    end
    for (int e = 0; e < DEF_N_EV; e++) c[e][e] = 1'b0;
    return c;
  endfunction

  localparam logic [DEF_N_EV-1:0][DEF_N_EV-1:0] DEF_CONFLICT = def_conflict();

endpackage
