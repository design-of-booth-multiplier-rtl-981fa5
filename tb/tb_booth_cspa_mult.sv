// tb_booth_cspa_mult: end-to-end test of the Booth multiplier on the carry
// speculative adder, at the default parameters (8-bit signed operands).
//
// Multiplies every pair of 8-bit signed operands (65536 products) and checks
// each product against the integer product. For every multiplication the
// testbench also replays the additions the multiplier must make (running sum
// plus digit * mcand * 4**i, digits taken from the multiplier bits) through
// the arithmetic model of the adder, counts those the speculation gets wrong
// (E) and checks that done arrives exactly 1 + W/2 + E cycles after start and
// that the recovery pulse count equals E. It counts how often each mechanism
// happened: one-cycle additions, recovered additions, multiplications with no
// recovery and with several, and each Booth digit value; one that never
// happened is a failure.
module tb_booth_cspa_mult;
  import tb_cspa_model_pkg::*;
  localparam int unsigned W = 8, X = 4, K = 2, L = W / 2;

  int checks = 0, failures = 0;
  int n_fast = 0, n_rec = 0, n_clean = 0, n_multi = 0, recov_seen = 0;
  int digit_cnt [5] = '{default: 0};

  logic             clk = 0, rst_n = 0, start = 0;
  logic [W-1:0]     mcand_i = '0, mplier_i = '0;
  logic [2*W-1:0]   product_o;
  logic             done_o, busy_o, recov_o;

  booth_cspa_mult dut (.clk, .rst_n, .start, .mcand_i, .mplier_i,
                       .product_o, .done_o, .busy_o, .recov_o);

  always #5 clk = ~clk;
  always @(posedge clk) if (recov_o) recov_seen++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // additions the adder will see, and how many it mispredicts
  function automatic int expected_recoveries(int m, int q);
    u64_t acc = '0, pp, mask = (u64_t'(1) << (2 * W)) - 1;
    int e = 0;
    logic [W:0] qe = {W'(q), 1'b0};
    for (int i = 0; i < int'(L); i++) begin
      int d = -2 * int'(qe[2*i+2]) + int'(qe[2*i+1]) + int'(qe[2*i]);
      digit_cnt[d + 2]++;
      pp = u64_t'(longint'(m) * longint'(d) * (longint'(1) << (2 * i))) & mask;
      if (mispredict(acc, pp, 2 * W, X, K) != 0) e++;
      acc = (acc + pp) & mask;
    end
    return e;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int m = -128; m < 128; m++)
      for (int q = -128; q < 128; q++) begin
        automatic int e, cyc = 0, rec0;
        e = expected_recoveries(m, q);
        chk(!busy_o, "idle before start");
        mcand_i = W'(m); mplier_i = W'(q); start = 1;
        rec0 = recov_seen;
        @(posedge clk);
        #1 start = 0;
        do begin
          @(posedge clk);
          #1 cyc++;
        end while (!done_o && cyc < 100);
        chk(done_o, $sformatf("%0d * %0d finished", m, q));
        chk(product_o == 16'(m * q), $sformatf("%0d * %0d = %0d, got %0d", m, q, m * q, $signed(product_o)));
        chk(cyc == 1 + int'(L) + e, $sformatf("%0d * %0d took %0d cycles, expected %0d", m, q, cyc, 1 + L + e));
        chk(recov_seen - rec0 == e, $sformatf("%0d * %0d recoveries %0d, expected %0d", m, q, recov_seen - rec0, e));
        n_rec  += e;
        n_fast += int'(L) - e;
        if (e == 0) n_clean++;
        if (e >= 2) n_multi++;
        @(negedge clk);
      end
    $display("additions: %0d one-cycle, %0d recovered; products: %0d without recovery, %0d with two or more",
             n_fast, n_rec, n_clean, n_multi);
    $display("Booth digits -2..+2: %0d %0d %0d %0d %0d",
             digit_cnt[0], digit_cnt[1], digit_cnt[2], digit_cnt[3], digit_cnt[4]);
    chk(n_fast > 0,  "one-cycle additions happened");
    chk(n_rec > 0,   "recovered additions happened");
    chk(n_clean > 0, "multiplications without recovery happened");
    chk(n_multi > 0, "multiplications with several recoveries happened");
    for (int d = 0; d < 5; d++) chk(digit_cnt[d] > 0, $sformatf("Booth digit %0d used", d - 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
