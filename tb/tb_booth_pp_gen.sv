// tb_booth_pp_gen: exhaustive self-checking test of the partial-product
// generator for W = 8: every multiplicand, every digit in {-2..+2} and every
// digit position 0..3; the result must equal mcand * digit * 4**idx taken
// modulo 2**16 (two's complement).
module tb_booth_pp_gen;
  import booth_pkg::*;
  localparam int unsigned W = 8;
  int checks = 0, failures = 0;
  logic [W-1:0]   mcand;
  booth_sel_t     sel;
  logic [2:0]     idx;
  logic [2*W-1:0] pp;

  booth_pp_gen #(.W(W)) dut (.mcand, .sel, .idx(idx[$clog2(W/2+1)-1:0]), .pp);

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
    for (int m = -128; m < 128; m++)
      for (int d = -2; d <= 2; d++)
        for (int i = 0; i < 4; i++) begin
          mcand = W'(m);
          sel.neg = d < 0;
          sel.one = d == 1 || d == -1;
          sel.two = d == 2 || d == -2;
          idx = 3'(i);
          #1;
          chk(pp == 16'(m * d * (1 << (2 * i))), $sformatf("m=%0d d=%0d i=%0d pp=%h", m, d, i, pp));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
