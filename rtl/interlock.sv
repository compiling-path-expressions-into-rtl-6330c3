// interlock: two-way mutual-exclusion (interlock) element.
//
// At most one of gnt_a and gnt_b is high. A request that arrives while the
// other side holds its grant waits; a grant is held for as long as its
// request stays high, whatever the other request does. The transistor-level
// element resolves a simultaneous request through metastability, settled by
// thermal noise; this clocked version resolves it by alternating: the side
// that did not win the last tie wins the next one. Requests and grants are
// active high (the cross-coupled NOR original is active low). Grants are
// registered, one clock after the request.
module interlock (
  input  logic clk,
  input  logic rst_n,
  input  logic req_a,
  input  logic req_b,
  output logic gnt_a,
  output logic gnt_b
);
  logic last_a;   // side that won the last simultaneous request
  logic tie;

  assign tie = req_a && req_b && !gnt_a && !gnt_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt_a  <= 1'b0;
      gnt_b  <= 1'b0;
      last_a <= 1'b0;
    end else begin
      gnt_a <= req_a && (gnt_a || (!gnt_b && (!req_b || !last_a)));
      gnt_b <= req_b && (gnt_b || (!gnt_a && (!req_a ||  last_a)));
      if (tie) last_a <= !last_a;
    end
  end

  mutex_a : assert property (@(posedge clk) disable iff (!rst_n) !(gnt_a && gnt_b));
endmodule
