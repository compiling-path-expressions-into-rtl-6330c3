// tb_event_cell: random non-overlapping Start/End phases, ENB, TR and INIT.
// RES must equal (ENB AND TR) as sampled during the last Start phase, passed
// on during the following End phase; INIT clears it.
module tb_event_cell;
  logic clk = 0, rst_n = 0;
  logic init, st, en, enb, tr, res;
  logic m_ref, r_ref;
  int checks = 0, failures = 0, ones = 0;

  event_cell dut (.clk(clk), .rst_n(rst_n), .init(init), .start_ph(st), .end_ph(en),
                  .enb(enb), .tr_e(tr), .res(res));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init = 0; st = 0; en = 0; enb = 0; tr = 0;
    m_ref = 0; r_ref = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      init = ($urandom_range(0, 40) == 0);
      enb  = 1'($urandom);
      tr   = 1'($urandom);
      case ($urandom_range(0, 2))
        0: begin st = 1; en = 0; end
        1: begin st = 0; en = 1; end
        default: begin st = 0; en = 0; end
      endcase
      @(posedge clk);
      if (init) begin m_ref = 0; r_ref = 0; end
      else begin
        if (st) m_ref = enb & tr;
        if (en) r_ref = m_ref;
      end
      #1;
      checks++;
      if (res !== r_ref) begin
        failures++;
        $display("%0t: res=%b expected %b", $time, res, r_ref);
      end
      if (res) ones++;
    end
    checks++;
    if (ones < 50) begin failures++; $display("RES rarely high"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
