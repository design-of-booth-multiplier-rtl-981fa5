// tb_cspa_error_detect: self-checking test of the error detection.
// Random 16-bit operand pairs (4 blocks of 4 bits, K = 2), with a share of
// pairs built to carry a long way, are turned into block generate, propagate
// and predicted carries by whole-number additions. The detector must raise ER
// exactly when some block's predicted carry differs from its true carry, and
// its lowest ERR_block bit must name the first such block.
module tb_cspa_error_detect;
  import tb_cspa_model_pkg::*;
  localparam int unsigned N = 16, X = 4, K = 2, M = 4;
  int checks = 0, failures = 0, n_err = 0;

  logic [M-1:0] g_blk, p_blk, c_pred, err_block;
  logic         er;

  cspa_error_detect #(.M(M)) dut (.g_blk, .p_blk, .c_pred, .err_block, .er);

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
      automatic u64_t a = u64_t'($urandom_range(0, 65535));
      automatic u64_t b = u64_t'($urandom_range(0, 65535));
      automatic u64_t mis;
      if (t % 3 == 0) b = lowbits(~a ^ u64_t'(1 << $urandom_range(0, 15)), N);  // long propagate runs
      for (int i = 0; i < M; i++) begin
        automatic u64_t ab = lowbits(a >> (i * X), X), bb = lowbits(b >> (i * X), X);
        g_blk[i]  = (ab + bb) >= 16;
        p_blk[i]  = (ab ^ bb) == 15;
        c_pred[i] = pred_cout(a, b, i, N, X, K);
      end
      #1;
      mis = mispredict(a, b, N, X, K);
      if (mis != 0) n_err++;
      chk(er == (mis != 0), $sformatf("er a=%h b=%h", a, b));
      chk(lowest(u64_t'(err_block)) == lowest(mis), $sformatf("first block a=%h b=%h", a, b));
      chk(er == |err_block, "er is OR of err_block");
    end
    chk(n_err > 100, "mispredictions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
