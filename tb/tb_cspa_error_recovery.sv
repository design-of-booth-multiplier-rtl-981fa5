// tb_cspa_error_recovery: self-checking test of the error recovery.
// Random operand pairs for an 18-bit adder of 4-bit blocks (leftmost block 2
// bits, K = 2). The testbench forms the partial sums, the speculative sum and
// the block generate/propagate by whole-number additions; the recovery must
// return the exact sum and carry out, and re-select exactly the blocks whose
// carry-in was mispredicted.
module tb_cspa_error_recovery;
  import tb_cspa_model_pkg::*;
  localparam int unsigned N = 18, X = 4, K = 2, M = 5;
  int checks = 0, failures = 0, n_fix = 0;

  logic [M-1:0] g_blk, p_blk, c_pred, fix_block;
  logic [N-1:0] s0, s1, sum_spec, sum_rec;
  logic         cout_rec;

  cspa_error_recovery #(.N(N), .X(X)) dut (
    .g_blk, .p_blk, .c_pred, .s0, .s1, .sum_spec, .sum_rec, .cout_rec, .fix_block
  );

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
    for (int t = 0; t < 20000; t++) begin
      automatic u64_t a = u64_t'($urandom_range(0, (1 << N) - 1));
      automatic u64_t b = u64_t'($urandom_range(0, (1 << N) - 1));
      automatic u64_t full, fixexp = '0;
      if (t % 3 == 0) b = lowbits(~a ^ u64_t'(1 << $urandom_range(0, N - 1)), N);
      for (int i = 0; i < M; i++) begin
        automatic int unsigned w = blk_w(i, N, X);
        automatic u64_t ab = lowbits(a >> (i * X), w), bb = lowbits(b >> (i * X), w);
        g_blk[i]  = ((ab + bb) >> w) != 0;
        p_blk[i]  = (ab ^ bb) == lowbits('1, w);
        c_pred[i] = pred_cout(a, b, i, N, X, K);
        for (int j = 0; j < int'(w); j++) begin
          automatic u64_t z = ab + bb, o = ab + bb + 1;
          s0[i*X + j] = z[j];
          s1[i*X + j] = o[j];
        end
        if (i > 0) fixexp[i] = true_cout(a, b, i - 1, N, X) ^ pred_cout(a, b, i - 1, N, X, K);
      end
      sum_spec = N'(spec_sum(a, b, N, X, K));
      #1;
      full = a + b;
      if (fixexp != 0) n_fix++;
      chk(sum_rec == N'(full), $sformatf("sum a=%h b=%h got %h", a, b, sum_rec));
      chk(cout_rec == full[N], $sformatf("cout a=%h b=%h", a, b));
      chk(u64_t'(fix_block) == fixexp, $sformatf("fix a=%h b=%h", a, b));
    end
    chk(n_fix > 100, "recoveries exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
