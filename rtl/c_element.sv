// c_element: Muller C-element with N inputs.
//
// The output goes high once all inputs are high and low once all inputs are
// low; in between it keeps its value. The self-timed original is a
// state-holding gate; here the state is one register sampled on clk, so the
// output follows its inputs one clock later. Reset clears the output, which
// matches a circuit whose handshake lines all start low.
module c_element #(
  parameter int N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] a,
  output logic         y
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        y <= 1'b0;
    else if (&a)       y <= 1'b1;
    else if (!(|a))    y <= 1'b0;
  end
endmodule
