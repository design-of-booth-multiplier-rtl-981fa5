// tb_booth_encoder: exhaustive self-checking test of the radix-4 Booth encoder.
// For each of the eight bit triplets the decoded digit (sign and magnitude)
// must equal -2*q[2i+1] + q[2i] + q[2i-1], with a one-hot or zero magnitude and
// no negative zero.
module tb_booth_encoder;
  import booth_pkg::*;
  int checks = 0, failures = 0;
  logic [2:0] triplet;
  booth_sel_t sel;

  booth_encoder dut (.triplet, .sel);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
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
    for (int t = 0; t < 8; t++) begin
      automatic int d, got;
      triplet = 3'(t);
      #1;
      d   = -2 * int'(triplet[2]) + int'(triplet[1]) + int'(triplet[0]);
      got = (sel.two ? 2 : sel.one ? 1 : 0) * (sel.neg ? -1 : 1);
      chk(got == d, $sformatf("triplet %b: digit %0d, got %0d", triplet, d, got));
      chk(!(sel.one && sel.two), $sformatf("triplet %b: magnitude one-hot", triplet));
      chk(!(sel.neg && !sel.one && !sel.two), $sformatf("triplet %b: no negative zero", triplet));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
