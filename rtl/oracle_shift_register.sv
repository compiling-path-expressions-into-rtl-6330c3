// oracle_shift_register: splits one random bit stream into N random bits.
//
// The digitised output of an external noise source is shifted into an N-bit
// register on every clk, much faster than arbitration cycles occur, so the
// parallel outputs are largely uncorrelated by the time they are sampled.
// The noise source itself is analog and outside this design; noise_bit is
// its digitised output. One register stage per output bit, no latency beyond
// the shift.
module oracle_shift_register #(
  parameter int N = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         noise_bit,
  output logic [N-1:0] bits
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bits <= '0;
    else        bits <= (bits << 1) | N'(noise_bit);
  end
endmodule
