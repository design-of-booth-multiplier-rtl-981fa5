// tb_cspa_sum_mux: self-checking test of the Sum*/Sum** output multiplexer.
// Random sums and carries on both inputs; the output must follow input 0
// (Sum*) for ER = 0 and input 1 (Sum**) for ER = 1.
module tb_cspa_sum_mux;
  localparam int unsigned N = 16;
  int checks = 0, failures = 0;
  logic er, cs, cr, cout;
  logic [N-1:0] ss, sr, sum;

  cspa_sum_mux #(.N(N)) dut (.er, .sum_spec(ss), .cout_spec(cs), .sum_rec(sr), .cout_rec(cr), .sum, .cout);

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
    for (int t = 0; t < 2000; t++) begin
      er = t[0]; ss = N'($urandom); sr = N'($urandom); cs = $urandom_range(0, 1) == 1; cr = !cs;
      #1;
      chk(sum == (er ? sr : ss), "sum");
      chk(cout == (er ? cr : cs), "cout");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
