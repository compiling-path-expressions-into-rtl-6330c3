// tb_sr_ff: random set/reset against a reference; checks both reset values
// and that reset wins over set.
module tb_sr_ff;
  logic clk = 0, rst_n = 0;
  logic s, r;
  logic q0, q1, ref0, ref1;
  int checks = 0, failures = 0;

  sr_ff #(.INIT(1'b0)) dut0 (.clk(clk), .rst_n(rst_n), .s(s), .r(r), .q(q0));
  sr_ff #(.INIT(1'b1)) dut1 (.clk(clk), .rst_n(rst_n), .s(s), .r(r), .q(q1));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = 0; r = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q0 !== 1'b0 || q1 !== 1'b1) begin failures++; $display("reset values wrong"); end
    ref0 = 0; ref1 = 1;
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      s = 1'($urandom);
      r = 1'($urandom);
      @(posedge clk);
      if (r) begin ref0 = 0; ref1 = 0; end
      else if (s) begin ref0 = 1; ref1 = 1; end
      #1;
      checks++;
      if (q0 !== ref0 || q1 !== ref1) begin
        failures++;
        $display("mismatch s=%b r=%b q=%b%b expected %b%b", s, r, q0, q1, ref0, ref1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
