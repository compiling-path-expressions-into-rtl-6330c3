// event_cell: recognizer cell for one occurrence of an event in a path.
//
// ENB says that this occurrence of the event is allowed as the next event.
// During the Start phase the master latch takes ENB AND TR_e, i.e. "this
// occurrence has just happened"; during the End phase the slave latch passes
// that value on to RES. The master/slave pair clocked by the non-overlapping
// Start and End phases acts as one edge-triggered flip-flop per event cycle.
// The recognizer NORs this cell's ENB with the ENB of every other cell for
// the same event to form DIS_e. INIT clears both latches.
//
// The latches are registers loaded while their phase is high (clocked
// emulation); RES changes one clk after End rises.
module event_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic init,
  input  logic start_ph,
  input  logic end_ph,
  input  logic enb,
  input  logic tr_e,
  output logic res
);
  logic master;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      master <= 1'b0;
      res    <= 1'b0;
    end else if (init) begin
      master <= 1'b0;
      res    <= 1'b0;
    end else begin
      if (start_ph) master <= enb && tr_e;
      if (end_ph)   res    <= master;
    end
  end
endmodule
