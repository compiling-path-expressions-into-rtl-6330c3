// seq_cell: the ';' (sequence) cell of a recognizer.
//
// The left operand is enabled by this cell's ENB; the right operand is
// enabled by the RES of the left operand; the RES of the right operand is
// this cell's RES.
//
// Every sub-circuit's RES is carried as two parts: rlat, the part that comes
// from event-cell latches, and nul, a constant saying that the sub-expression
// can match the empty sequence (it then passes ENB straight through to RES).
// RES = rlat | (nul & ENB). Splitting RES this way lets the '*' cell close its
// feedback loop in logic (see star_cell) so that the recognizer has no
// combinational loops. Purely combinational.
module seq_cell (
  input  logic enb,
  input  logic l_rlat,
  input  logic l_null,
  input  logic r_rlat,
  input  logic r_null,
  output logic l_enb,
  output logic r_enb,
  output logic rlat,
  output logic nul
);
  assign l_enb = enb;
  assign r_enb = l_rlat | (l_null & enb);      // RES of the left operand
  assign rlat  = r_rlat | (r_null & l_rlat);   // RES of the right operand, ENB part removed
  assign nul   = l_null & r_null;
endmodule
