// Processing element: one degree-4 check node together with the variable
// node updates of its four edges.
//
// The check node update is split by the forward/backward recursion into
// elementary steps with two inputs: the first stage forms I12 = V1 (+) V2 and
// I34 = V3 (+) V4 with two check elementary steps running in parallel; the
// second stage forms each C2V message from one internal vector and one input
// (U1 = V2 (+) I34, U2 = V1 (+) I34, U3 = I12 (+) V4, U4 = I12 (+) V3), each in a
// function unit that also performs the inverse permutation, the variable
// node update and the decision of that edge. Six elementary steps, two stages.
//
// Interface and timing: pulse start with d_in (the stored V2C messages of the
// four variable nodes, variable-node symbol domain), the edge coefficients h
// and their inverses hinv, and the channel data of the four variable nodes;
// everything is captured. The V2C messages are permuted (multiplied by h)
// into the check domain on capture. One cycle later stage 1 starts; when both
// first-stage steps are done the four function units start. done pulses when
// all four new V2C messages d_out and decisions dec are valid.
module nb_pe
  import nb_pkg::*;
#(
  parameter int unsigned NM    = 8,
  parameter int unsigned NS    = 5,
  parameter int unsigned NC    = 5,
  parameter llr_t        GAMMA = llr_t'(-24)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  elem_t [DC-1:0][NM-1:0]   d_in,
  input  sym_t  [DC-1:0]           h,
  input  sym_t  [DC-1:0]           hinv,
  input  bllr_vec_t [DC-1:0]       bllr,
  input  elem_t [DC-1:0][NC-1:0]   ch_top,
  output elem_t [DC-1:0][NM-1:0]   d_out,
  output sym_t  [DC-1:0]           dec,
  output logic                     done
);
  elem_t [DC-1:0][NM-1:0] dq, pv;
  sym_t  [DC-1:0]         hiq;
  bllr_vec_t [DC-1:0]     blq;
  elem_t [DC-1:0][NC-1:0] ctq;
  logic                   s1_start, s2_start;
  logic  [1:0]            s1_done, s1_seen;
  elem_t [NM-1:0]         i12, i34;
  logic  [1:0]            s1_busy;
  logic  [1:0][1:0]       s1_push;
  elem_t [1:0][1:0]       s1_elem;
  logic  [DC-1:0]         fu_done, fu_seen;
  elem_t [DC-1:0][NM-1:0] fu_in1, fu_in2;

  // capture and permutation into the check domain
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dq       <= '0;
      pv       <= '0;
      hiq      <= '0;
      blq      <= '0;
      ctq      <= '0;
      s1_start <= 1'b0;
    end else begin
      s1_start <= start;
      if (start) begin
        dq  <= d_in;
        hiq <= hinv;
        blq <= bllr;
        ctq <= ch_top;
        for (int e = 0; e < DC; e++)
          for (int i = 0; i < NM; i++) begin
            pv[e][i]     <= d_in[e][i];
            pv[e][i].sym <= gf_mul(d_in[e][i].sym, h[e]);
          end
      end
    end
  end

  // first stage: I12 and I34
  nb_ces #(.NM(NM), .NS(NS)) u_ces12 (
    .clk, .rst_n, .start(s1_start), .in1(pv[0]), .in2(pv[1]),
    .busy(s1_busy[0]), .done(s1_done[0]), .o_vec(i12), .s_push(s1_push[0]), .s_elem(s1_elem[0]));
  nb_ces #(.NM(NM), .NS(NS)) u_ces34 (
    .clk, .rst_n, .start(s1_start), .in1(pv[2]), .in2(pv[3]),
    .busy(s1_busy[1]), .done(s1_done[1]), .o_vec(i34), .s_push(s1_push[1]), .s_elem(s1_elem[1]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_seen  <= '0;
      s2_start <= 1'b0;
      fu_seen  <= '0;
      done     <= 1'b0;
    end else begin
      s2_start <= 1'b0;
      done     <= 1'b0;
      if (start) begin
        s1_seen <= '0;
        fu_seen <= '0;
      end else begin
        s1_seen <= s1_seen | s1_done;
        if (((s1_seen | s1_done) == 2'b11) && (s1_seen != 2'b11)) s2_start <= 1'b1;
        fu_seen <= fu_seen | fu_done;
        if (((fu_seen | fu_done) == '1) && (fu_seen != '1)) done <= 1'b1;
      end
    end
  end

  // second stage: one function unit per edge
  assign fu_in1[0] = pv[1]; assign fu_in2[0] = i34;
  assign fu_in1[1] = pv[0]; assign fu_in2[1] = i34;
  assign fu_in1[2] = i12;   assign fu_in2[2] = pv[3];
  assign fu_in1[3] = i12;   assign fu_in2[3] = pv[2];

  for (genvar e = 0; e < DC; e++) begin : g_fu
    nb_fu #(.NM(NM), .NS(NS), .NC(NC), .GAMMA(GAMMA)) u_fu (
      .clk, .rst_n, .start(s2_start), .in1(fu_in1[e]), .in2(fu_in2[e]),
      .hinv(hiq[e]), .bllr(blq[e]), .ch_top(ctq[e]), .d_old(dq[e]),
      .d_new(d_out[e]), .dec(dec[e]), .done(fu_done[e]));
  end
endmodule
