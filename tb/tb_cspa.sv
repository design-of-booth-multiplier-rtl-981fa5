// tb_cspa: self-checking test of the variable-latency carry speculative adder.
// Runs two adders side by side with the streaming checker tb_cspa_harness: the
// default configuration (16 bits, 4-bit blocks, 2 predictor bits) and an
// 18-bit one with 4-bit blocks and 3 predictor bits, whose leftmost block is
// only 2 bits wide. Each must deliver exact sums, one-cycle additions when the
// speculation holds and two-cycle additions through the recovery otherwise.
module tb_cspa;
  logic clk = 0;
  int c0, f0, fast0, rec0, c1, f1, fast1, rec1;
  bit d0, d1;

  always #5 clk = ~clk;

  tb_cspa_harness #(.N(16), .X(4), .K(2), .NOPS(20000)) h0 (
    .clk, .checks(c0), .failures(f0), .n_fast(fast0), .n_rec(rec0), .finished(d0));
  tb_cspa_harness #(.N(18), .X(4), .K(3), .NOPS(20000)) h1 (
    .clk, .checks(c1), .failures(f1), .n_fast(fast1), .n_rec(rec1), .finished(d1));

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1);
    $display("16-bit: %0d one-cycle, %0d recovered additions", fast0, rec0);
    $display("18-bit: %0d one-cycle, %0d recovered additions", fast1, rec1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end
endmodule
