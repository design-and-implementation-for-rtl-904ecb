// Shared types, constants and functions of the GF(64) (2,4)-regular
// quasi-cyclic NB-LDPC decoder.
//
// Message elements are (symbol, log-likelihood) pairs. Likelihoods follow the
// extended min-sum convention: larger means more likely, the best element of a
// normalised vector is 0 and all others are negative; sums saturate at -64
// (7-bit signed, the 7 quantisation bits of the implemented decoder). Each
// element carries a valid bit so that a vector that was not filled can be
// told apart from a vector of real symbols.
//
// The parity-check matrix is 7 block rows x 14 block columns of 8x8 circulant
// permutation matrices (code length 112 symbols, 56 checks). Block row b uses
// the block columns H_COL[b][e] with cyclic shift H_SHIFT[b][e]: row k of block
// row b is connected to variable (8*H_COL[b][e] + (k+H_SHIFT[b][e]) mod 8).
// The non-zero GF(64) coefficients of the matrix are not published; this
// design derives them from a fixed formula (h_exp below). GF(64) uses the
// primitive polynomial x^6 + x + 1, also this design's own choice.
package nb_pkg;

  localparam int unsigned P      = 6;     // bits per symbol, GF(2^6)
  localparam int unsigned Q      = 64;    // field size
  localparam int unsigned LLR_W  = 7;     // quantisation bits of a message LLR
  localparam int unsigned BLLR_W = 6;     // quantisation bits of a binary channel LLR
  localparam int unsigned R      = 8;     // circulant size
  localparam int unsigned BROWS  = 7;     // block rows (= number of PEs)
  localparam int unsigned BCOLS  = 14;    // block columns
  localparam int unsigned DC     = 4;     // check node degree
  localparam int unsigned NVAR   = R * BCOLS;  // 112 variable nodes
  localparam int unsigned NCHK   = R * BROWS;  // 56 check nodes

  localparam logic [P-1:0] PRIM_POLY = 6'b000011;  // x^6 = x + 1

  typedef logic [P-1:0]             sym_t;
  typedef logic signed [LLR_W-1:0]  llr_t;
  typedef logic signed [BLLR_W-1:0] bllr_t;
  typedef bllr_t [P-1:0]            bllr_vec_t;   // binary LLRs of one variable

  // log(P(bit=0)/P(bit=1)) convention for bllr_t: positive favours a 0 bit.

  typedef struct packed {
    logic vld;
    sym_t sym;
    llr_t llr;
  } elem_t;

  localparam llr_t LLR_MIN = llr_t'(-64);
  localparam llr_t LLR_MAX = llr_t'(63);

  // Block-column and shift tables of the quasi-cyclic matrix.
  typedef int unsigned tab_t [BROWS][DC];
  localparam tab_t H_COL = '{
    '{3, 6, 10, 11}, '{2, 6,  9, 12}, '{1, 5, 9, 13}, '{2, 5, 8, 13},
    '{0, 4,  8, 12}, '{0, 3,  7, 11}, '{1, 4, 7, 10}};
  localparam tab_t H_SHIFT = '{
    '{5, 0, 0, 1}, '{4, 4, 4, 5}, '{7, 7, 7, 0}, '{0, 1, 6, 6},
    '{2, 1, 1, 2}, '{4, 7, 7, 7}, '{1, 6, 3, 3}};

  function automatic llr_t sat_add(llr_t a, llr_t b);
    logic signed [LLR_W:0] s;
    s = {a[LLR_W-1], a} + {b[LLR_W-1], b};
    if (s < $signed({1'b1, LLR_MIN}))      return LLR_MIN;
    else if (s > $signed({1'b0, LLR_MAX})) return LLR_MAX;
    else                                   return llr_t'(s);
  endfunction

  function automatic llr_t sat_sub(llr_t a, llr_t b);
    logic signed [LLR_W:0] s;
    s = {a[LLR_W-1], a} - {b[LLR_W-1], b};
    if (s < $signed({1'b1, LLR_MIN}))      return LLR_MIN;
    else if (s > $signed({1'b0, LLR_MAX})) return LLR_MAX;
    else                                   return llr_t'(s);
  endfunction

  // Carry-less multiply modulo the primitive polynomial.
  function automatic sym_t gf_mul(sym_t a, sym_t b);
    sym_t acc, x;
    acc = '0;
    x   = a;
    for (int i = 0; i < P; i++) begin
      if (b[i]) acc = acc ^ x;
      x = x[P-1] ? ((x << 1) ^ PRIM_POLY) : (x << 1);
    end
    return acc;
  endfunction

  // alpha^e for 0 <= e < 63
  function automatic sym_t gf_alog(int unsigned e);
    sym_t x;
    x = sym_t'(1);
    for (int i = 0; i < 63; i++)
      if (i < int'(e % 63)) x = x[P-1] ? ((x << 1) ^ PRIM_POLY) : (x << 1);
    return x;
  endfunction

  // Exponent of the non-zero coefficient of edge e of row k in block row b.
  function automatic int unsigned h_exp(int unsigned b, int unsigned k, int unsigned e);
    return (11 * b + 5 * k + 17 * e + 3) % 63;
  endfunction

  function automatic sym_t h_coef(int unsigned b, int unsigned k, int unsigned e);
    return gf_alog(h_exp(b, k, e));
  endfunction

  function automatic sym_t h_coef_inv(int unsigned b, int unsigned k, int unsigned e);
    return gf_alog((63 - h_exp(b, k, e)) % 63);
  endfunction

  // Variable node of edge e of row k in block row b.
  function automatic int unsigned h_var(int unsigned b, int unsigned k, int unsigned e);
    return R * H_COL[b][e] + (k + H_SHIFT[b][e]) % R;
  endfunction

endpackage
