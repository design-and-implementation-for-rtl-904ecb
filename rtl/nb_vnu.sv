// Variable node unit for degree-2 variable nodes. A degree-2 variable node
// passes on to one check the C2V message of the other check plus the channel
// likelihoods, so no forward/backward recursion is needed and one input is
// always the channel. The channel vector is not stored in full: the CVC
// recomputes the channel likelihood of any symbol from the six binary LLRs.
//
// Operation: every incoming C2V element (symbol s, likelihood u) yields the
// candidate (s, u + C(s)); then the NC stored most likely channel symbols
// whose symbols did not appear in the C2V vector yield (s, C(s) + GAMMA),
// GAMMA being the constant compensation value standing for the truncated
// part of the C2V vector. Candidates are insertion-sorted into an NM-entry
// vector, which is finally normalised so that its best entry is 0. Taking the
// NM C2V symbols plus NC = 5 channel symbols costs NM + 5 cycles instead of
// the 2*NM of a general two-input variable step. The number of stored channel
// symbols follows the decoder this RTL implements; GAMMA's value is this
// design's own choice.
//
// Interface and timing: pulse start with bllr and ch_top (captured). Then
// present C2V elements on in_vld/in_elem, one per cycle, in any order, and
// raise in_end once no more will come (it may stay high). After the stream
// the unit spends NC cycles on the channel symbols and one on normalising;
// done pulses with o_vec valid until the next start.
module nb_vnu
  import nb_pkg::*;
#(
  parameter int unsigned NM    = 8,
  parameter int unsigned NC    = 5,
  parameter llr_t        GAMMA = llr_t'(-24)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  bllr_vec_t      bllr,
  input  elem_t [NC-1:0] ch_top,
  input  logic           in_vld,
  input  elem_t          in_elem,
  input  logic           in_end,
  output elem_t [NM-1:0] o_vec,
  output logic           done
);
  typedef enum logic [1:0] {S_IDLE, S_STRM, S_CHAN, S_NORM} state_t;

  state_t          st;
  bllr_vec_t       bl;
  elem_t [NC-1:0]  ct;
  elem_t [NM-1:0]  acc;
  logic  [63:0]    seen;
  logic  [$clog2(NC+1)-1:0] j;
  llr_t            cv;

  nb_cvc u_cvc (.bllr(bl), .sym(in_elem.sym), .llr(cv));

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

  elem_t ch_e;
  assign ch_e = ct[j];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      bl    <= '0;
      ct    <= '0;
      acc   <= '0;
      seen  <= '0;
      j     <= '0;
      o_vec <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          bl   <= bllr;
          ct   <= ch_top;
          acc  <= '0;
          seen <= '0;
          st   <= S_STRM;
        end
        S_STRM: begin
          if (in_vld) begin
            acc <= ins_sorted(acc, '{vld: 1'b1, sym: in_elem.sym, llr: sat_add(in_elem.llr, cv)});
            seen[in_elem.sym] <= 1'b1;
          end else if (in_end) begin
            j  <= '0;
            st <= S_CHAN;
          end
        end
        S_CHAN: begin
          if (ch_e.vld && !seen[ch_e.sym])
            acc <= ins_sorted(acc, '{vld: 1'b1, sym: ch_e.sym, llr: sat_add(ch_e.llr, GAMMA)});
          if (32'(j) == NC - 1) st <= S_NORM;
          j <= j + 1'b1;
        end
        S_NORM: begin
          for (int k = 0; k < NM; k++) begin
            o_vec[k]     <= acc[k];
            o_vec[k].llr <= acc[k].vld ? sat_sub(acc[k].llr, acc[0].llr) : LLR_MIN;
          end
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
