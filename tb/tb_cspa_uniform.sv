// tb_cspa_uniform: the carry speculative adder at its default parameters on
// uniformly random unsigned operands, the input statistics the adder is meant
// for. Streams 200000 additions through the checker tb_cspa_harness (exact
// sums, ER, ERR_block, one- or two-cycle latency per addition) and reports the
// share of additions that needed the recovery cycle and the mean latency. The
// mean must stay below 1.5 cycles per addition, i.e. speculation must be
// right most of the time, and both latencies must occur.
module tb_cspa_uniform;
  logic clk = 0;
  int c, f, fast, rec;
  bit d;

  always #5 clk = ~clk;

  tb_cspa_harness #(.N(16), .X(4), .K(2), .NOPS(200000), .MIX(1'b0)) h (
    .clk, .checks(c), .failures(f), .n_fast(fast), .n_rec(rec), .finished(d));

  initial begin
    repeat (1_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c, f + 1);
    $finish;
  end

  initial begin
    real mean;
    int extra = 0;
    wait (d);
    mean = real'(fast + 2 * rec) / real'(fast + rec);
    $display("uniform 16-bit: %0d one-cycle, %0d recovered, mean latency %0.3f cycles", fast, rec, mean);
    if (!(mean < 1.5)) begin
      extra = 1;
      $display("FAIL mean latency %0.3f", mean);
    end
    $display("TB_RESULT checks=%0d failures=%0d", c + 1, f + extra);
    $finish;
  end
endmodule
