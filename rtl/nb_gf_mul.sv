// GF(64) multiplier: the permutation and inverse permutation of NB-LDPC
// decoding. A message symbol leaving a variable node is multiplied by the
// non-zero parity-check coefficient of its edge, and a symbol returning from
// the check node by the inverse coefficient. Multiplying by a non-zero constant
// is a one-to-one map of the field, so the likelihood order of a message
// vector is unchanged and only symbols are rewritten.
//
// Purely combinational: shift-and-add (carry-less) multiplication reduced by
// the primitive polynomial x^6 + x + 1 (this design's choice of polynomial).
module nb_gf_mul
  import nb_pkg::*;
(
  input  sym_t a,
  input  sym_t b,
  output sym_t y
);
  assign y = gf_mul(a, b);
endmodule
