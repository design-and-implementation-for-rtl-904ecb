// LLR generator: from the six binary channel LLRs of a variable node it
// produces the NM most likely GF(64) symbols with their likelihoods, sorted,
// which are the initial V2C messages of a frame (and whose first NC entries
// are the stored channel symbols). Taking binary LLRs at the input cuts the
// input data per variable from 64 likelihoods to six binary LLRs.
//
// This implementation is the simplest that does the job: it sweeps all 64
// symbols, one per cycle, through a channel value calculator and keeps the
// NM best in an insertion-sorted register vector. Timing: in_vld is accepted
// when in_rdy is high; 64 cycles later out_vld pulses for one cycle with
// out_top (normalised, best = 0) and the captured binary LLRs on out_bllr.
module nb_llr_gen
  import nb_pkg::*;
#(
  parameter int unsigned NM = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_vld,
  input  bllr_vec_t      in_bllr,
  output logic           in_rdy,
  output logic           out_vld,
  output elem_t [NM-1:0] out_top,
  output bllr_vec_t      out_bllr
);
  logic           run;
  logic [6:0]     s;
  bllr_vec_t      bl;
  elem_t [NM-1:0] acc;
  llr_t           cv;

  nb_cvc u_cvc (.bllr(bl), .sym(s[5:0]), .llr(cv));

  function automatic elem_t [NM-1:0] ins_sorted(elem_t [NM-1:0] o, elem_t e);
    elem_t [NM-1:0] r;
    int unsigned    pos;
    pos = 0;
    for (int k = 0; k < NM; k++) if (o[k].vld && o[k].llr >= e.llr) pos++;
    for (int k = 0; k < NM; k++) begin
      if (k < pos)       r[k] = o[k];
      else if (k == pos) r[k] = e;
      else               r[k] = o[k-1];
    end
    return r;
  endfunction

  elem_t [NM-1:0] acc_n;
  assign acc_n = ins_sorted(acc, '{vld: 1'b1, sym: s[5:0], llr: cv});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run      <= 1'b0;
      s        <= '0;
      bl       <= '0;
      acc      <= '0;
      out_vld  <= 1'b0;
      out_top  <= '0;
      out_bllr <= '0;
    end else begin
      out_vld <= 1'b0;
      if (!run) begin
        if (in_vld) begin
          run <= 1'b1;
          bl  <= in_bllr;
          s   <= '0;
          acc <= '0;
        end
      end else begin
        acc <= acc_n;
        s   <= s + 1'b1;
        if (s == 7'd63) begin
          run      <= 1'b0;
          out_vld  <= 1'b1;
          out_top  <= acc_n;
          out_bllr <= bl;
        end
      end
    end
  end

  assign in_rdy = !run;
endmodule
