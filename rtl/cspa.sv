// cspa: variable-latency carry speculative adder (CSPA).
//
// Adds two unsigned N-bit operands. The adder is cut into M block adders of X
// bits (the leftmost block takes what remains when X does not divide N). Each
// block computes its partial sums for carry-in 0 and 1; a carry predictor looks
// only at the K bits next to each block's MSB and predicts its carry-out, and
// that prediction selects the partial sum of the next block. This gives the
// speculative sum Sum* after a delay set by X and K, not by N.
// The error detection compares each predicted carry with a one-block check
// (XOR) and raises ER and the per-block ERR_block. When ER is 0, Sum* is exact
// and the addition takes one cycle. When ER is 1, the error recovery replaces
// the partial sums of the blocks with a wrong carry-in by the other partial sum
// (Sum**), the output multiplexer selects it, and the addition takes two
// cycles: the recovery path is meant to be timed as a two-cycle path.
//
// Interface and timing: a_i / b_i are taken into the operand registers (EN) at
// every rising edge where valid_o is 1. sum_o / cout_o belong to the registered
// operands and are final in a cycle where valid_o is 1; valid_o is 1 in the
// first cycle after the load if the speculation was right, in the second
// otherwise. The producer must therefore hold the next operands on a_i / b_i
// whenever valid_o is high. After reset the registers hold 0 + 0.
// The blocks, the prediction from the MSB side, the XOR detection, the
// Sum*/Sum** multiplexer driven by ER and VALID fed back to the operand
// registers follow the document; widths, the carry-select form of the block
// adders and the absence of a carry-in are this design's choices.
module cspa #(
  parameter int unsigned N = 16,  // adder width n
  parameter int unsigned X = 4,   // block adder width x
  parameter int unsigned K = 2    // carry predictor bits k
) (
  input  logic                       clk,
  input  logic                       rst_n,      // asynchronous, active low
  input  logic [N-1:0]               a_i,
  input  logic [N-1:0]               b_i,
  output logic [N-1:0]               sum_o,
  output logic                       cout_o,
  output logic                       valid_o,    // VALID
  output logic                       er_o,       // ER
  output logic [(N+X-1)/X-1:0]       err_block_o // ERR_block
);

  localparam int unsigned M  = (N + X - 1) / X;   // number of block adders
  localparam int unsigned LW = N - (M - 1) * X;   // width of the leftmost block

  initial begin
    assert (X >= 1 && X <= N) else $error("cspa: X must be in 1..N");
    assert (K >= 1 && K <= X) else $error("cspa: K must be in 1..X");
  end

  logic [N-1:0] a_q, b_q;
  logic [N-1:0] s0, s1, sum_spec, sum_rec;
  logic [M-1:0] g_blk, p_blk, c_pred, p_top, fix_block;
  logic         cout_spec, cout_rec, second;

  // EN registers
  cspa_operand_reg #(.W(N)) u_reg_a (.clk, .rst_n, .en(valid_o), .d(a_i), .q(a_q));
  cspa_operand_reg #(.W(N)) u_reg_b (.clk, .rst_n, .en(valid_o), .d(b_i), .q(b_q));

  // Block adders and their carry predictors
  for (genvar i = 0; i < M; i++) begin : g_blk_i
    localparam int unsigned W  = (i == M - 1) ? LW : X;
    localparam int unsigned KK = (K < W) ? K : W;
    localparam int unsigned LO = i * X;

    cspa_block_adder #(.W(W)) u_add (
      .a(a_q[LO +: W]), .b(b_q[LO +: W]),
      .s0(s0[LO +: W]), .s1(s1[LO +: W]),
      .g_blk(g_blk[i]), .p_blk(p_blk[i])
    );

    cspa_carry_predictor #(.W(W), .K(KK)) u_pred (
      .a(a_q[LO +: W]), .b(b_q[LO +: W]),
      .c_pred(c_pred[i]), .p_top(p_top[i])
    );

    // Sum*: the predicted carry of the block below selects this block's sum
    if (i == 0) begin : g_first
      assign sum_spec[LO +: W] = s0[LO +: W];
    end else begin : g_rest
      assign sum_spec[LO +: W] = c_pred[i-1] ? s1[LO +: W] : s0[LO +: W];
    end
  end
  assign cout_spec = c_pred[M-1];

  cspa_error_detect #(.M(M)) u_det (
    .g_blk, .p_blk, .c_pred, .err_block(err_block_o), .er(er_o)
  );

  cspa_error_recovery #(.N(N), .X(X), .M(M)) u_rec (
    .g_blk, .p_blk, .c_pred, .s0, .s1, .sum_spec,
    .sum_rec, .cout_rec, .fix_block
  );

  cspa_sum_mux #(.N(N)) u_mux (
    .er(er_o), .sum_spec, .cout_spec, .sum_rec, .cout_rec, .sum(sum_o), .cout(cout_o)
  );

  cspa_valid_ctrl u_ctl (.clk, .rst_n, .er(er_o), .valid(valid_o), .second);

  // A block whose top K bits do not all propagate is always predicted right,
  // and a recovered addition is never started from a state without an error.
  for (genvar i = 0; i < M; i++) begin : g_chk
    a_certain : assert property (@(posedge clk) disable iff (!rst_n)
      !p_top[i] |-> !err_block_o[i]);
  end
  a_second : assert property (@(posedge clk) disable iff (!rst_n) second |-> er_o);

endmodule
