// Function unit: second-stage check elementary step chained with the
// variable node update of the same edge. The check step computes the C2V
// message of one edge of the check node (in the check domain); every element
// it accepts is streamed at once, through the internal buffer, into the
// inverse permutation (multiplication by the inverse edge coefficient), the
// VNU and the decision unit. Computing the new V2C message while the C2V
// message is produced means the full C2V vector never has to be buffered,
// and the redundancy check of the check step is shared with the VNU.
//
// Interface and timing: pulse start with in1/in2 (check step inputs, check
// domain), hinv, the channel data bllr/ch_top and the stored V2C message
// d_old of the edge's variable node (all captured). done pulses once the new
// V2C message d_new (towards the variable's other check) and the hard
// decision dec are valid; they hold until the next start. Latency is about
// NM/2..NM cycles of check step plus NC + 3 cycles.
module nb_fu
  import nb_pkg::*;
#(
  parameter int unsigned NM    = 8,
  parameter int unsigned NS    = 5,
  parameter int unsigned NC    = 5,
  parameter llr_t        GAMMA = llr_t'(-24)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  elem_t [NM-1:0] in1,
  input  elem_t [NM-1:0] in2,
  input  sym_t           hinv,
  input  bllr_vec_t      bllr,
  input  elem_t [NC-1:0] ch_top,
  input  elem_t [NM-1:0] d_old,
  output elem_t [NM-1:0] d_new,
  output sym_t           dec,
  output logic           done
);
  logic           ces_busy, ces_done;
  elem_t [NM-1:0] c2v;
  logic  [1:0]    s_push;
  elem_t [1:0]    s_elem;
  logic           b_vld, b_empty;
  elem_t          b_elem, v_elem;
  sym_t           hinv_q;
  logic           ces_fin, ended, fin_sent;
  logic           vnu_done, dec_done, vnu_seen, dec_seen;

  nb_ces #(.NM(NM), .NS(NS)) u_ces (
    .clk, .rst_n, .start, .in1, .in2,
    .busy(ces_busy), .done(ces_done), .o_vec(c2v), .s_push, .s_elem);

  nb_ibuf #(.DEPTH(NM / 2)) u_buf (
    .clk, .rst_n, .clear(start), .in_vld(s_push), .in_elem(s_elem),
    .out_vld(b_vld), .out_elem(b_elem), .empty(b_empty));

  // inverse permutation back to the variable-node symbol domain
  nb_gf_mul u_iperm (.a(b_elem.sym), .b(hinv_q), .y(v_elem.sym));
  assign v_elem.vld = b_elem.vld;
  assign v_elem.llr = b_elem.llr;

  // the stream has ended once the check step is finished and the buffer drained
  assign ended = ces_fin && b_empty && !b_vld;

  nb_vnu #(.NM(NM), .NC(NC), .GAMMA(GAMMA)) u_vnu (
    .clk, .rst_n, .start, .bllr, .ch_top,
    .in_vld(b_vld), .in_elem(v_elem), .in_end(ended), .o_vec(d_new), .done(vnu_done));

  nb_decision #(.NM(NM), .GAMMA(GAMMA)) u_dec (
    .clk, .rst_n, .start, .d_old, .in_vld(b_vld), .in_elem(v_elem),
    .fin(ended && !fin_sent), .dec, .done(dec_done));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hinv_q   <= '0;
      ces_fin  <= 1'b0;
      fin_sent <= 1'b0;
      vnu_seen <= 1'b0;
      dec_seen <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        hinv_q   <= hinv;
        ces_fin  <= 1'b0;
        fin_sent <= 1'b0;
        vnu_seen <= 1'b0;
        dec_seen <= 1'b0;
      end else begin
        if (ces_done) ces_fin <= 1'b1;
        if (ended) fin_sent <= 1'b1;
        if (vnu_done) vnu_seen <= 1'b1;
        if (dec_done) dec_seen <= 1'b1;
        if ((vnu_done || vnu_seen) && (dec_done || dec_seen) && !(vnu_seen && dec_seen))
          done <= 1'b1;
      end
    end
  end
endmodule
