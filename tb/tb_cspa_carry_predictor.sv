// tb_cspa_carry_predictor: exhaustive self-checking test of the carry predictor.
// For a 4-bit block with K = 2 and an 8-bit block with K = 3 it checks every
// operand pair: the prediction must be the carry out of adding only the top K
// bits, p_top must say whether those bits all propagate, and whenever p_top is
// 0 the prediction must equal the true carry out of the whole block.
module tb_cspa_carry_predictor;
  int checks = 0, failures = 0;

  logic [3:0] a4, b4; logic c4, t4;
  logic [7:0] a8, b8; logic c8, t8;

  cspa_carry_predictor #(.W(4), .K(2)) dut4 (.a(a4), .b(b4), .c_pred(c4), .p_top(t4));
  cspa_carry_predictor #(.W(8), .K(3)) dut8 (.a(a8), .b(b8), .c_pred(c8), .p_top(t8));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j); #1;
        chk(c4 == ((i >> 2) + (j >> 2) >= 4), $sformatf("K2 pred %0d %0d", i, j));
        chk(t4 == (((i ^ j) >> 2) == 3),       $sformatf("K2 ptop %0d %0d", i, j));
        if (!t4) chk(c4 == (i + j >= 16),      $sformatf("K2 certain %0d %0d", i, j));
      end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j); #1;
        chk(c8 == ((i >> 5) + (j >> 5) >= 8), $sformatf("K3 pred %0d %0d", i, j));
        chk(t8 == (((i ^ j) >> 5) == 7),       $sformatf("K3 ptop %0d %0d", i, j));
        if (!t8) chk(c8 == (i + j >= 256),     $sformatf("K3 certain %0d %0d", i, j));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
