// sr_ff: set/reset flip-flop with a per-instance reset value.
//
// s sets q, r clears it; with both asserted, reset wins. The value after
// rst_n is INIT, so that, for example, the synchronizer's CLR flip-flops can
// start high. State is one register sampled on clk (one clock of latency).
module sr_ff #(
  parameter logic INIT = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic s,
  input  logic r,
  output logic q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= INIT;
    else if (r)  q <= 1'b0;
    else if (s)  q <= 1'b1;
  end
endmodule
