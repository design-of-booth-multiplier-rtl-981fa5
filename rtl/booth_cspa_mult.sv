// booth_cspa_mult: radix-4 Booth multiplier built on the variable-latency
// carry speculative adder.
//
// Multiplies two signed W-bit operands into a signed 2W-bit product. The
// multiplier operand is recoded into W/2 radix-4 Booth digits; each digit
// selects a partial product (0, +-mcand, +-2*mcand, weighted by 4**i). The
// partial products are summed one per addition by a single 2W-bit carry
// speculative adder (CSPA) whose operand register A serves as the running
// product: each time the adder raises VALID, its sum is fed back into A and
// the next partial product into B. An addition takes one cycle when the
// adder's carry speculation is right and two when its error recovery has to
// step in, so the multiplication time varies with the data.
//
// Interface: pulse start for one cycle while busy_o is 0, with mcand_i and
// mplier_i valid in that cycle; they are captured. done_o is a one-cycle pulse
// with product_o valid from then until the next done. recov_o pulses in every
// cycle in which the adder completes an addition through its error recovery.
// Timing: with L = W/2 digits and E of the L additions recovered, done_o rises
// 1 + L + E clock cycles after the edge that took start.
// Radix-4 Booth recoding and the use of the CSPA as the multiplier's adder
// follow the document; the sequential accumulation through one adder, the
// handshake and all widths are this design's choices.
module booth_cspa_mult
  import booth_pkg::*;
#(
  parameter int unsigned W = 8,  // operand width (even, at least 4)
  parameter int unsigned X = 4,  // CSPA block adder width
  parameter int unsigned K = 2   // CSPA carry predictor bits
) (
  input  logic             clk,
  input  logic             rst_n,      // asynchronous, active low
  input  logic             start,
  input  logic [W-1:0]     mcand_i,    // signed multiplicand
  input  logic [W-1:0]     mplier_i,   // signed multiplier
  output logic [2*W-1:0]   product_o,  // signed product
  output logic             done_o,
  output logic             busy_o,
  output logic             recov_o
);

  localparam int unsigned L  = W / 2;              // Booth digits / additions
  localparam int unsigned IW = $clog2(W / 2 + 1);  // digit index width
  localparam int unsigned M  = (2 * W + X - 1) / X;

  initial assert (W >= 4 && W % 2 == 0) else $error("booth_cspa_mult: W must be even and >= 4");

  typedef enum logic [1:0] {IDLE, RUN, LAST} state_t;

  state_t          state;
  logic [W-1:0]    mcand_q, mplier_q;
  logic [IW-1:0]   idx;
  logic [W:0]      q_ext;
  booth_sel_t      sel;
  logic [2*W-1:0]  pp, add_a, add_b, sum;
  logic            cout, valid, er;
  logic [M-1:0]    err_block;

  // Booth recoding of the current digit and its partial product
  assign q_ext = {mplier_q, 1'b0};
  booth_encoder u_enc (.triplet(q_ext[2*idx +: 3]), .sel);
  booth_pp_gen #(.W(W)) u_pp (.mcand(mcand_q), .sel, .idx, .pp);

  // Operands offered to the adder; taken when it raises VALID
  always_comb begin
    add_a = '0;
    add_b = '0;
    if (state == RUN) begin
      add_a = (idx == '0) ? '0 : sum;
      add_b = pp;
    end
  end

  // The adder's carry out and ERR_block are not needed here: the additions are
  // done modulo 2**(2W), and the signed product always fits in 2W bits.
  cspa #(.N(2 * W), .X(X), .K(K)) u_add (
    .clk, .rst_n, .a_i(add_a), .b_i(add_b),
    .sum_o(sum), .cout_o(cout), .valid_o(valid), .er_o(er), .err_block_o(err_block)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      mcand_q   <= '0;
      mplier_q  <= '0;
      idx       <= '0;
      product_o <= '0;
      done_o    <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          mcand_q  <= mcand_i;
          mplier_q <= mplier_i;
          idx      <= '0;
          state    <= RUN;
        end
        RUN: if (valid) begin
          if (idx == IW'(L - 1)) state <= LAST;
          else                   idx   <= idx + 1'b1;
        end
        LAST: if (valid) begin
          product_o <= sum;
          done_o    <= 1'b1;
          state     <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy_o  = (state != IDLE);
  assign recov_o = valid & er & busy_o;

  // The adder is idle on 0 + 0 whenever a multiplication starts, so the first
  // partial product is always loaded in the first RUN cycle.
  a_first_load : assert property (@(posedge clk) disable iff (!rst_n)
    (state == RUN && idx == '0) |-> valid);

endmodule
