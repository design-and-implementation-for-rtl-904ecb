// Channel memory (LLR_CV). Per variable node it keeps the six binary channel
// LLRs (6 bits each) and the NC most likely channel symbols with their
// likelihoods, instead of a sorted channel vector of NM elements: the VNU
// rebuilds any other channel likelihood from the binary LLRs. At GF(64) with
// NC = 5 this is 36 + 5*14 bits per variable.
//
// Array with NP combinational read ports; load writes all words at once when a
// new frame is taken over from the input buffer.
module nb_llrcv_mem
  import nb_pkg::*;
#(
  parameter int unsigned NC    = 5,
  parameter int unsigned WORDS = NVAR,
  parameter int unsigned NP    = BROWS * DC
) (
  input  logic                              clk,
  input  logic                              load,
  input  bllr_vec_t [WORDS-1:0]             lbllr,
  input  elem_t [WORDS-1:0][NC-1:0]         ltop,
  input  logic  [NP-1:0][$clog2(WORDS)-1:0] raddr,
  output bllr_vec_t [NP-1:0]                rbllr,
  output elem_t [NP-1:0][NC-1:0]            rtop
);
  bllr_vec_t      bl  [WORDS];
  elem_t [NC-1:0] top [WORDS];

  always_ff @(posedge clk)
    if (load)
      for (int w = 0; w < WORDS; w++) begin
        bl[w]  <= lbllr[w];
        top[w] <= ltop[w];
      end

  always_comb
    for (int p = 0; p < NP; p++) begin
      rbllr[p] = bl[raddr[p]];
      rtop[p]  = top[raddr[p]];
    end
endmodule
