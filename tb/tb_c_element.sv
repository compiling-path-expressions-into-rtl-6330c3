// tb_c_element: random inputs to a 3-input C-element, compared every cycle
// with a reference that keeps its own copy of the output.
module tb_c_element;
  logic clk = 0, rst_n = 0;
  logic [2:0] a;
  logic y, ref_y;
  int checks = 0, failures = 0;

  c_element #(.N(3)) dut (.clk(clk), .rst_n(rst_n), .a(a), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0;
    ref_y = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // bias towards all-high and all-low so the output moves often
      case ($urandom_range(0, 3))
        0: a = '1;
        1: a = '0;
        default: a = 3'($urandom);
      endcase
      @(posedge clk);
      if (a == 3'b111) ref_y = 1;
      else if (a == 3'b000) ref_y = 0;
      #1;
      checks++;
      if (y !== ref_y) begin
        failures++;
        $display("mismatch a=%b y=%b expected %b", a, y, ref_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
