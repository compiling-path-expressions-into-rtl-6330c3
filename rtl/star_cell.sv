// star_cell: the '*' (Kleene star) cell of a recognizer.
//
// The operand is enabled when this cell's ENB is 1 or when the operand has
// just produced RES (one more repetition may follow), and that same signal is
// this cell's RES (zero or more repetitions have completed). The published
// cell closes this loop through gates and breaks it with an AND against End
// after each event, so that nested stars cannot hold a 1 by themselves. Here
// the loop is solved in logic instead: with RES split into a latched part and
// an empty-match flag (see seq_cell), the settled loop value is
// ENB | operand-rlat, which contains no feedback; the End gate is not needed.
// A star always matches the empty sequence. Purely combinational.
module star_cell (
  input  logic enb,
  input  logic o_rlat,
  output logic o_enb,
  output logic rlat,
  output logic nul
);
  assign o_enb = enb | o_rlat;
  assign rlat  = o_rlat;
  assign nul   = 1'b1;
endmodule
