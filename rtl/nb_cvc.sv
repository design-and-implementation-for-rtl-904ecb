// Channel value calculator (CVC). Instead of storing a full channel vector of
// 64 likelihoods, only the p = 6 binary LLRs of a variable node are kept; the
// likelihood of any symbol is recomputed on demand as the sum, over its bits,
// of the penalty -|LLR_i| for every bit that disagrees with the sign of LLR_i.
// The most likely symbol (the bitwise hard decision) thus gets 0 and every
// other symbol a negative value, matching the normalised message vectors.
//
// Binary LLRs use log(P(0)/P(1)): a positive LLR favours a 0 bit. The six
// per-bit penalties are chosen by a multiplexer and summed by an adder tree;
// the result saturates at -64. Combinational, no clock.
module nb_cvc
  import nb_pkg::*;
(
  input  bllr_vec_t bllr,
  input  sym_t      sym,
  output llr_t      llr
);
  logic signed [BLLR_W+3:0] acc;
  logic signed [BLLR_W-1:0] v;
  always_comb begin
    acc = '0;
    for (int i = 0; i < P; i++) begin
      // bit 1 against a positive LLR, or bit 0 against a negative one
      v = $signed(bllr[i]);
      if (sym[i] && v > 0)       acc = acc - (BLLR_W+4)'(v);
      else if (!sym[i] && v < 0) acc = acc + (BLLR_W+4)'(v);
    end
    llr = (acc < -64) ? LLR_MIN : llr_t'(acc);
  end
endmodule
