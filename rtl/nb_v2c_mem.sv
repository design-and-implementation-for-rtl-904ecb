// V2C message memory. For degree-2 variable nodes only one message per
// variable node is kept: after a check updates the variable, the stored
// message is overwritten with the new V2C message towards the variable's
// other check, which is exactly what that check reads later. This halves the
// edge-message storage. Each word is one sorted message vector (NM elements
// of valid bit, 6-bit symbol and 7-bit likelihood).
//
// The words are held in an array with NP read and NP write ports (one per
// edge of every processing element; a group of checks never touches a
// variable twice, so the write addresses of one cycle are distinct). Reads are
// combinational, writes take effect at the clock edge. load writes all words
// at once from ldata (initial messages of a new frame) and has priority.
module nb_v2c_mem
  import nb_pkg::*;
#(
  parameter int unsigned NM    = 8,
  parameter int unsigned WORDS = NVAR,
  parameter int unsigned NP    = BROWS * DC
) (
  input  logic                          clk,
  input  logic                          load,
  input  elem_t [WORDS-1:0][NM-1:0]     ldata,
  input  logic  [NP-1:0][$clog2(WORDS)-1:0] raddr,
  output elem_t [NP-1:0][NM-1:0]        rdata,
  input  logic  [NP-1:0]                we,
  input  logic  [NP-1:0][$clog2(WORDS)-1:0] waddr,
  input  elem_t [NP-1:0][NM-1:0]        wdata
);
  elem_t [NM-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (load) begin
      for (int w = 0; w < WORDS; w++) mem[w] <= ldata[w];
    end else begin
      for (int p = 0; p < NP; p++)
        if (we[p]) mem[waddr[p]] <= wdata[p];
    end
  end

  always_comb
    for (int p = 0; p < NP; p++) rdata[p] = mem[raddr[p]];

endmodule
