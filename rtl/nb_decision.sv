// Decision unit of a degree-2 variable node. The posterior likelihood of a
// symbol is the sum of both C2V messages and the channel; the stored V2C
// message towards the check just processed already holds one C2V message plus
// the channel, so adding the freshly computed C2V message of that check gives
// the posterior. Both vectors are truncated: a symbol missing from one of them
// gets the compensation value GAMMA in its place, as in a variable
// elementary step. The symbol with the largest posterior is the decision.
//
// Operation: start captures the stored V2C vector d_old. Each C2V element on
// in_vld/in_elem (one per cycle, variable-node symbol domain) is matched
// against all d_old symbols and its posterior compared with the running best.
// A pulse on fin adds the d_old symbols that never came on the stream (their
// likelihood plus GAMMA) and registers dec with a done pulse one cycle later.
module nb_decision
  import nb_pkg::*;
#(
  parameter int unsigned NM    = 8,
  parameter llr_t        GAMMA = llr_t'(-24)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  elem_t [NM-1:0] d_old,
  input  logic           in_vld,
  input  elem_t          in_elem,
  input  logic           fin,
  output sym_t           dec,
  output logic           done
);
  elem_t [NM-1:0] d;
  logic  [63:0]   seen;
  logic           have;
  llr_t           best_llr;
  sym_t           best_sym;
  llr_t           post, fin_llr;
  sym_t           fin_sym;
  logic           fin_have;

  // posterior of the streamed element
  always_comb begin
    post = sat_add(in_elem.llr, GAMMA);
    for (int k = 0; k < NM; k++)
      if (d[k].vld && d[k].sym == in_elem.sym) post = sat_add(in_elem.llr, d[k].llr);
  end

  // final comparison including the V2C symbols absent from the C2V stream
  always_comb begin
    fin_llr  = best_llr;
    fin_sym  = best_sym;
    fin_have = have;
    for (int k = 0; k < NM; k++)
      if (d[k].vld && !seen[d[k].sym] &&
          (!fin_have || sat_add(d[k].llr, GAMMA) > fin_llr)) begin
        fin_llr  = sat_add(d[k].llr, GAMMA);
        fin_sym  = d[k].sym;
        fin_have = 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d        <= '0;
      seen     <= '0;
      have     <= 1'b0;
      best_llr <= LLR_MIN;
      best_sym <= '0;
      dec      <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        d        <= d_old;
        seen     <= '0;
        have     <= 1'b0;
        best_llr <= LLR_MIN;
        best_sym <= '0;
      end else if (in_vld) begin
        seen[in_elem.sym] <= 1'b1;
        if (!have || post > best_llr) begin
          best_llr <= post;
          best_sym <= in_elem.sym;
          have     <= 1'b1;
        end
      end else if (fin) begin
        dec  <= fin_sym;
        done <= 1'b1;
      end
    end
  end
endmodule
