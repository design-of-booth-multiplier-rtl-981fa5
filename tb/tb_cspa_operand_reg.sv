// tb_cspa_operand_reg: self-checking test of the EN operand register.
// Drives random data with a random enable for 2000 cycles and checks that q
// takes d one edge after en = 1, holds otherwise, and is zero after reset.
module tb_cspa_operand_reg;
  localparam int unsigned W = 16;
  int checks = 0, failures = 0, loads = 0, holds = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] d = '0, q, exp_q;

  cspa_operand_reg #(.W(W)) dut (.clk, .rst_n, .en, .d, .q);

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
    #1 chk(q == '0, "reset value");
    rst_n = 1;
    exp_q = '0;
    for (int t = 0; t < 2000; t++) begin
      en = ($urandom_range(0, 1) == 1);
      d  = W'($urandom);
      @(posedge clk);
      if (en) begin exp_q = d; loads++; end
      else holds++;
      #1 chk(q == exp_q, $sformatf("cycle %0d", t));
    end
    chk(loads > 0 && holds > 0, "both load and hold exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
