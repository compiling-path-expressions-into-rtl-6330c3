// seq_controller: controller of a sequencer for one simple path.
//
// The outside world requests event e by raising tr[e] and lowering it again
// after ta[e] has risen (four-phase handshake). The controller ORs all TR
// lines and passes the result through a delay line of DELAY clock cycles.
// One C-element per event combines tr[e] with the delayed signal, so ta[e]
// is tr[e] delayed by the time the recognizer needs to settle. Two gates
// compare the undelayed and delayed signals: "some TR and no TA yet" asks for
// the Start phase, "some TA and no TR any more" asks for the End phase. A
// mutual-exclusion element between them guarantees that the two phases never
// overlap. Start and End act as the two clock phases of the recognizer.
//
// Timing (clk edges): ta[e] rises on the (DELAY+1)-th clock edge after tr[e]
// rises and falls on the (DELAY+1)-th edge after tr[e] falls. Start is high
// from the first edge after tr rises to the edge on which ta rises; End is
// high from the first edge after tr falls to the edge on which ta falls.
//
// The structure (OR, delay, crossed gates, M.E., one C gate per event) is the
// published controller. The delay length has no published value; DELAY is this
// design's choice and must cover the recognizer's settling time (1 cycle here).
module seq_controller #(
  parameter int N_EV  = 7,
  parameter int DELAY = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_EV-1:0] tr,
  output logic [N_EV-1:0] ta,
  output logic            start_ph,
  output logic            end_ph
);
  logic            any_tr;
  logic [DELAY-1:0] dline;
  logic            dly;

  assign any_tr = |tr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dline <= '0;
    else        dline <= {dline[DELAY-2:0], any_tr};
  end
  assign dly = dline[DELAY-1];

  interlock u_me (
    .clk   (clk),
    .rst_n (rst_n),
    .req_a (any_tr && !dly),
    .req_b (dly && !any_tr),
    .gnt_a (start_ph),
    .gnt_b (end_ph)
  );

  for (genvar e = 0; e < N_EV; e++) begin : g_ta
    c_element #(.N(2)) u_c (
      .clk   (clk),
      .rst_n (rst_n),
      .a     ({tr[e], dly}),
      .y     (ta[e])
    );
  end

  // Four-phase rule of the sequencer: TA only follows its own TR.
  ta_follows_tr : assert property (@(posedge clk) disable iff (!rst_n)
    (ta & ~$past(ta)) == ((ta & ~$past(ta)) & $past(tr)));
endmodule
