// tb_seq_controller: runs random four-phase TR/TA handshakes on a 3-event
// controller and checks the TA latency in both directions (DELAY+1 clock
// edges), that only the requested TA moves, that Start and End never overlap
// and that each handshake has exactly one Start phase and one End phase of
// DELAY clock cycles.
module tb_seq_controller;
  localparam int N = 3, DELAY = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] tr, ta;
  logic st, en;
  int checks = 0, failures = 0;
  int st_cyc, en_cyc, lat;

  seq_controller #(.N_EV(N), .DELAY(DELAY)) dut (
    .clk(clk), .rst_n(rst_n), .tr(tr), .ta(ta), .start_ph(st), .end_ph(en));

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (st) st_cyc++;
    if (en) en_cyc++;
    if (st && en) begin failures++; $display("Start and End overlap"); end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("%0t: %s", $time, m); end
  endtask

  initial begin
    tr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check(ta == '0 && !st && !en, "idle after reset");
    for (int i = 0; i < 300; i++) begin
      int e;
      e = $urandom_range(0, N - 1);
      @(negedge clk);
      st_cyc = 0; en_cyc = 0;
      tr[e] = 1;
      lat = 0;
      do begin @(posedge clk); #1; lat++; end while (!ta[e] && lat < 50);
      check(lat == DELAY + 1, $sformatf("TA rise latency %0d", lat));
      check(ta == (N'(1) << e), "only the requested TA rises");
      repeat ($urandom_range(0, 3)) @(posedge clk);
      check(st_cyc == DELAY, $sformatf("Start lasted %0d cycles", st_cyc));
      @(negedge clk);
      tr[e] = 0;
      lat = 0;
      do begin @(posedge clk); #1; lat++; end while (ta[e] && lat < 50);
      check(lat == DELAY + 1, $sformatf("TA fall latency %0d", lat));
      repeat ($urandom_range(0, 3)) @(posedge clk);
      check(en_cyc == DELAY, $sformatf("End lasted %0d cycles", en_cyc));
      check(!st && !en && ta == '0, "idle between handshakes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
