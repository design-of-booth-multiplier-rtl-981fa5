// tb_cspa_harness: drives one carry speculative adder with a stream of operand
// pairs and checks it against the arithmetic model (tb_cspa_model_pkg).
//
// New operands are offered all the time and replaced after each edge at which
// the adder raised VALID, as a producer following the VALID handshake would.
// For every completed addition it checks the sum and carry out, that ER and the
// first ERR_block bit match the model's mispredictions, and that the addition
// took one cycle when nothing was mispredicted and two cycles otherwise.
// With MIX set, about half of the pairs are built so that carries run across
// blocks; without it the operands are uniform random.
module tb_cspa_harness #(
  parameter int unsigned N    = 16,
  parameter int unsigned X    = 4,
  parameter int unsigned K    = 2,
  parameter int unsigned NOPS = 5000,
  parameter bit          MIX  = 1'b1   // 1: add carry-heavy pairs; 0: uniform random only
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   n_fast,  // additions done in one cycle
  output int   n_rec,   // additions done through the recovery, two cycles
  output bit   finished
);
  import tb_cspa_model_pkg::*;
  localparam int unsigned M = (N + X - 1) / X;

  logic         rst_n = 1'b0;
  logic [N-1:0] a_i = '0, b_i = '0, sum_o;
  logic         cout_o, valid_o, er_o;
  logic [M-1:0] err_block_o;

  cspa #(.N(N), .X(X), .K(K)) dut (.clk, .rst_n, .a_i, .b_i, .sum_o, .cout_o,
                                   .valid_o, .er_o, .err_block_o);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d: %s", N, what);
    end
  endtask

  function automatic logic [N-1:0] rnd();
    return N'({$urandom, $urandom});
  endfunction

  task automatic new_operands();
    automatic int unsigned kind = $urandom_range(0, 5);
    a_i = rnd();
    if (!MIX) kind = 5;
    case (kind)
      0, 1:    b_i = ~a_i ^ (N'(1) << $urandom_range(0, N - 1));  // long propagate run
      2:       b_i = ~a_i;                                          // all propagate
      default: b_i = rnd();
    endcase
  endtask

  initial begin
    u64_t la = '0, lb = '0, mis, full;
    int cyc = 0, done_ops = 0;
    bit load;
    checks = 0; failures = 0; n_fast = 0; n_rec = 0; finished = 0;
    new_operands();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // the adder idles on 0 + 0, which is always valid: it loads a_i / b_i next
    la = u64_t'(a_i); lb = u64_t'(b_i);
    @(posedge clk);
    #1 new_operands();
    while (done_ops < int'(NOPS)) begin
      @(negedge clk);
      cyc++;
      mis = mispredict(la, lb, N, X, K);
      chk(er_o == (mis != 0), $sformatf("ER for %h + %h", la, lb));
      chk(lowest(u64_t'(err_block_o)) == lowest(mis), $sformatf("first ERR_block for %h + %h", la, lb));
      load = valid_o;
      if (valid_o) begin
        full = la + lb;
        chk(cyc == ((mis != 0) ? 2 : 1), $sformatf("latency %0d for %h + %h", cyc, la, lb));
        chk(sum_o == N'(full), $sformatf("sum %h + %h = %h", la, lb, sum_o));
        chk(cout_o == full[N], $sformatf("cout %h + %h", la, lb));
        if (mis != 0) n_rec++; else n_fast++;
        done_ops++;
        la = u64_t'(a_i); lb = u64_t'(b_i); cyc = 0;
      end else begin
        chk(cyc < 2, "addition longer than two cycles");
      end
      @(posedge clk);
      #1 if (load) new_operands();
    end
    chk(n_fast > 0, "one-cycle additions happened");
    chk(n_rec > 0, "recovered additions happened");
    finished = 1;
  end
endmodule
