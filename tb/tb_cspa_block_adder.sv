// tb_cspa_block_adder: exhaustive self-checking test of one block adder.
// Runs every operand pair of a 4-bit and of a 5-bit block and compares the two
// partial sums, the group generate and the group propagate with whole-number
// additions: s0 = a+b, s1 = a+b+1 (mod 2^W), g = carry of a+b, p = (a^b) all ones.
module tb_cspa_block_adder;
  int checks = 0, failures = 0;

  logic [3:0] a4, b4, s04, s14; logic g4, p4;
  logic [4:0] a5, b5, s05, s15; logic g5, p5;

  cspa_block_adder #(.W(4)) dut4 (.a(a4), .b(b4), .s0(s04), .s1(s14), .g_blk(g4), .p_blk(p4));
  cspa_block_adder #(.W(5)) dut5 (.a(a5), .b(b5), .s0(s05), .s1(s15), .g_blk(g5), .p_blk(p5));

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
        chk(s04 == 4'(i + j),       $sformatf("W4 s0 %0d+%0d", i, j));
        chk(s14 == 4'(i + j + 1),   $sformatf("W4 s1 %0d+%0d", i, j));
        chk(g4 == (i + j >= 16),    $sformatf("W4 g %0d+%0d", i, j));
        chk(p4 == ((i ^ j) == 15),  $sformatf("W4 p %0d+%0d", i, j));
      end
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a5 = 5'(i); b5 = 5'(j); #1;
        chk(s05 == 5'(i + j),       $sformatf("W5 s0 %0d+%0d", i, j));
        chk(s15 == 5'(i + j + 1),   $sformatf("W5 s1 %0d+%0d", i, j));
        chk(g5 == (i + j >= 32),    $sformatf("W5 g %0d+%0d", i, j));
        chk(p5 == ((i ^ j) == 31),  $sformatf("W5 p %0d+%0d", i, j));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
