// tb_oracle_shift_register: shifts a random stream in and compares the
// parallel output with the last N bits of the stream.
module tb_oracle_shift_register;
  localparam int N = 7;
  logic clk = 0, rst_n = 0;
  logic nb;
  logic [N-1:0] bits, hist;
  int checks = 0, failures = 0;

  oracle_shift_register #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .noise_bit(nb), .bits(bits));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nb = 0;
    hist = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      nb = 1'($urandom);
      @(posedge clk);
      hist = {hist[N-2:0], nb};
      #1;
      checks++;
      if (bits !== hist) begin
        failures++;
        $display("bits=%b expected %b", bits, hist);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
