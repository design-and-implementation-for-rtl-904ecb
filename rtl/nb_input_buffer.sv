// Input buffer: collects the binary LLRs and the LLR generator's sorted
// symbol lists of the next frame while the decoder is still iterating on the
// current one, so the decoder can take over a new frame at once when it
// finishes. Entries are written in variable order; full rises when all WORDS
// entries of a frame are present. take (from the decoder) marks the frame as
// taken over and lets the next frame be written; the contents are read in
// parallel on rd_bllr/rd_top in the cycle of take.
module nb_input_buffer
  import nb_pkg::*;
#(
  parameter int unsigned NM    = 8,
  parameter int unsigned WORDS = NVAR
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      we,
  input  bllr_vec_t                 wbllr,
  input  elem_t [NM-1:0]            wtop,
  output logic                      full,
  input  logic                      take,
  output bllr_vec_t [WORDS-1:0]     rd_bllr,
  output elem_t [WORDS-1:0][NM-1:0] rd_top
);
  logic [$clog2(WORDS+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                cnt <= '0;
    else if (take)             cnt <= '0;
    else if (we && !full)      cnt <= cnt + 1'b1;
  end

  // Storage needs no reset: the decoder only reads it once all WORDS entries
  // of a frame have been written.
  always_ff @(posedge clk) begin
    if (!take && we && !full) begin
      rd_bllr[cnt[$clog2(WORDS)-1:0]] <= wbllr;
      rd_top[cnt[$clog2(WORDS)-1:0]]  <= wtop;
    end
  end

  assign full = (cnt == ($clog2(WORDS+1))'(WORDS));

  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n) we |-> !full);
endmodule
