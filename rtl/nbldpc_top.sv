// Core of the NB-LDPC decoder chip: LLR generator, input buffer and layered
// decoder for the (112,56) (2,4)-regular quasi-cyclic code over GF(64).
//
// Frames enter as binary channel LLRs, six per variable node (one GF(64)
// symbol), one variable node per accepted in_vld/in_rdy handshake, in
// variable order 0..111. The LLR generator turns each into the NM most likely
// symbols; both are stored in the input buffer. As soon as a whole frame is
// buffered and the decoder is idle, the decoder takes the frame over and the
// buffer is free for the next frame, so loading and decoding overlap.
// When decoding ends, done pulses with the 112 decoded symbols on dec_out,
// the number of iterations run and whether all parity checks hold.
//
// The three-part structure (LLR generator, input buffer, decoder), the code,
// n_m = 8, n_s = 5, 7-bit messages and 10 iterations follow the published
// decoder. The handshake, the one-variable-per-cycle input and the
// whole-frame handover are this design's own choices. The chip's test modes
// (input-buffer test, single-PE test, random-number-driven PE) are not part
// of this core.
module nbldpc_top
  import nb_pkg::*;
#(
  parameter int unsigned NM       = 8,
  parameter int unsigned NS       = 5,
  parameter int unsigned NC       = 5,
  parameter int unsigned MAX_ITER = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_vld,
  input  bllr_vec_t        in_bllr,
  output logic             in_rdy,
  output logic             done,
  output sym_t [NVAR-1:0]  dec_out,
  output logic [7:0]       iters,
  output logic             converged,
  output logic             dec_busy
);
  logic                     g_rdy, g_vld, buf_full, take;
  elem_t [NM-1:0]           g_top;
  bllr_vec_t                g_bllr;
  bllr_vec_t [NVAR-1:0]     b_bllr;
  elem_t [NVAR-1:0][NM-1:0] b_top;

  nb_llr_gen #(.NM(NM)) u_gen (
    .clk, .rst_n, .in_vld(in_vld && in_rdy), .in_bllr, .in_rdy(g_rdy),
    .out_vld(g_vld), .out_top(g_top), .out_bllr(g_bllr));

  nb_input_buffer #(.NM(NM)) u_ibuf (
    .clk, .rst_n, .we(g_vld), .wbllr(g_bllr), .wtop(g_top), .full(buf_full),
    .take, .rd_bllr(b_bllr), .rd_top(b_top));

  assign in_rdy = g_rdy && !buf_full;
  assign take   = buf_full && !dec_busy;

  nb_decoder #(.NM(NM), .NS(NS), .NC(NC), .MAX_ITER(MAX_ITER)) u_dec (
    .clk, .rst_n, .start(take), .ld_bllr(b_bllr), .ld_top(b_top),
    .busy(dec_busy), .done, .dec_out, .iters, .converged);
endmodule
