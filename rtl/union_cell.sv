// union_cell: the '+' (exclusive choice) cell of a recognizer.
//
// ENB is broadcast to both operands and their RES outputs are ORed. RES is
// carried as a latched part and an empty-match flag as described in
// seq_cell. Purely combinational.
module union_cell (
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
  assign r_enb = enb;
  assign rlat  = l_rlat | r_rlat;
  assign nul   = l_null | r_null;
endmodule
