// tb_cspa_valid_ctrl: self-checking test of the variable-latency control.
// Models a stream of additions, each either speculated right (ER stays 0) or
// wrong (ER is 1 until the addition completes), and checks that VALID comes in
// the first cycle of a right one and in the second cycle of a wrong one, with
// 'second' marking exactly that second cycle.
module tb_cspa_valid_ctrl;
  int checks = 0, failures = 0, n_one = 0, n_two = 0;
  logic clk = 0, rst_n = 0, er = 0, valid, second;

  cspa_valid_ctrl dut (.clk, .rst_n, .er, .valid, .second);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      automatic bit wrong = ($urandom_range(0, 2) == 0);
      er = wrong;
      #1;
      chk(second == 1'b0, "first cycle is not second");
      chk(valid == !wrong, $sformatf("first-cycle valid, add %0d", t));
      @(posedge clk); #1;
      if (wrong) begin
        chk(second == 1'b1, "second cycle marked");
        chk(valid == 1'b1, $sformatf("second-cycle valid, add %0d", t));
        n_two++;
        @(posedge clk); #1;
      end else n_one++;
    end
    chk(n_one > 0 && n_two > 0, "both latencies exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
