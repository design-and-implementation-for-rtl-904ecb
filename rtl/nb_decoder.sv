// Layered NB-LDPC decoder core for the (112,56) (2,4)-regular quasi-cyclic
// code over GF(64).
//
// Seven processing elements, one per block row, work on a group of seven
// checks at a time: group k holds row k of every block row. Because the
// circulant shifts of the two block rows meeting in any block column differ,
// the seven checks of a group share no variable node, so a group can be
// processed in parallel and its results written back before the next group
// reads them (layered schedule: later groups of the same iteration already
// use the updated messages). An iteration is the eight groups. The V2C
// memory keeps one message per variable node, which is the message towards
// the variable's next check in any order of the groups.
//
// Flow: start takes over a frame (binary LLRs and sorted initial symbol
// lists) from the input buffer: the initial lists become the V2C messages,
// the binary LLRs and the first NC symbols go to the channel memory, and the
// hard decisions are initialised with the most likely channel symbol. Then,
// per group: read the 28 messages and channel words, run the PEs, write back
// the new messages and decisions. After each iteration the syndrome of the
// decisions is checked; decoding stops when all checks hold (early
// termination) or after MAX_ITER iterations. done pulses with dec_out,
// iters (iterations run) and converged valid; they hold until the next start.
//
// Groups are processed one after another (no overlap between the check
// stages of successive groups), so no V2C read can meet a pending write and
// no bypass from the output to the input buffers is needed; this is this
// design's own scheduling choice.
module nb_decoder
  import nb_pkg::*;
#(
  parameter int unsigned NM       = 8,
  parameter int unsigned NS       = 5,
  parameter int unsigned NC       = 5,
  parameter llr_t        GAMMA    = llr_t'(-24),
  parameter int unsigned MAX_ITER = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  bllr_vec_t [NVAR-1:0]     ld_bllr,
  input  elem_t [NVAR-1:0][NM-1:0] ld_top,
  output logic                     busy,
  output logic                     done,
  output sym_t  [NVAR-1:0]         dec_out,
  output logic  [7:0]              iters,
  output logic                     converged
);
  localparam int unsigned NP = BROWS * DC;
  localparam int unsigned AW = $clog2(NVAR);

  typedef enum logic [2:0] {S_IDLE, S_GRP, S_WAIT, S_WRITE, S_SYN, S_SYNW} state_t;

  state_t                   st;
  logic [$clog2(R)-1:0]     grp;
  logic [7:0]               it;
  logic                     ld;
  elem_t [NVAR-1:0][NC-1:0] ld_ch;

  logic  [NP-1:0][AW-1:0]   addr;
  elem_t [NP-1:0][NM-1:0]   v2c_rd, v2c_wd;
  logic  [NP-1:0]           v2c_we;
  bllr_vec_t [NP-1:0]       ch_bllr;
  elem_t [NP-1:0][NC-1:0]   ch_top;
  sym_t  [NP-1:0]           hc, hci, pe_dec;
  logic  [BROWS-1:0]        pe_done, pe_seen;
  logic                     pe_start;
  logic                     syn_start, syn_ok, syn_done;

  // addresses and coefficients of the current group
  always_comb
    for (int b = 0; b < BROWS; b++)
      for (int e = 0; e < DC; e++) begin
        addr[b*DC+e] = AW'(h_var(b, 32'(grp), e));
        hc[b*DC+e]   = h_coef(b, 32'(grp), e);
        hci[b*DC+e]  = h_coef_inv(b, 32'(grp), e);
      end

  always_comb
    for (int v = 0; v < NVAR; v++)
      for (int c = 0; c < NC; c++) ld_ch[v][c] = ld_top[v][c];

  nb_v2c_mem #(.NM(NM)) u_v2c (
    .clk, .load(ld), .ldata(ld_top), .raddr(addr), .rdata(v2c_rd),
    .we(v2c_we), .waddr(addr), .wdata(v2c_wd));

  nb_llrcv_mem #(.NC(NC)) u_llrcv (
    .clk, .load(ld), .lbllr(ld_bllr), .ltop(ld_ch), .raddr(addr),
    .rbllr(ch_bllr), .rtop(ch_top));

  for (genvar b = 0; b < BROWS; b++) begin : g_pe
    nb_pe #(.NM(NM), .NS(NS), .NC(NC), .GAMMA(GAMMA)) u_pe (
      .clk, .rst_n, .start(pe_start),
      .d_in(v2c_rd[b*DC +: DC]), .h(hc[b*DC +: DC]), .hinv(hci[b*DC +: DC]),
      .bllr(ch_bllr[b*DC +: DC]), .ch_top(ch_top[b*DC +: DC]),
      .d_out(v2c_wd[b*DC +: DC]), .dec(pe_dec[b*DC +: DC]), .done(pe_done[b]));
  end

  nb_syndrome u_syn (.clk, .rst_n, .start(syn_start), .dec(dec_out), .ok(syn_ok), .done(syn_done));

  assign ld       = (st == S_IDLE) && start;
  assign pe_start = (st == S_GRP);
  assign v2c_we   = {NP{st == S_WRITE}};
  assign syn_start = (st == S_SYN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      grp       <= '0;
      it        <= '0;
      pe_seen   <= '0;
      dec_out   <= '0;
      iters     <= '0;
      converged <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          for (int v = 0; v < NVAR; v++) dec_out[v] <= ld_top[v][0].sym;
          grp <= '0;
          it  <= '0;
          st  <= S_GRP;
        end
        S_GRP: begin
          pe_seen <= '0;
          st      <= S_WAIT;
        end
        S_WAIT: begin
          pe_seen <= pe_seen | pe_done;
          if ((pe_seen | pe_done) == '1) st <= S_WRITE;
        end
        S_WRITE: begin
          for (int p = 0; p < NP; p++) dec_out[addr[p]] <= pe_dec[p];
          grp <= grp + 1'b1;
          st  <= (32'(grp) == R - 1) ? S_SYN : S_GRP;
        end
        S_SYN: st <= S_SYNW;
        S_SYNW: if (syn_done) begin
          if (syn_ok || 32'(it) + 1 >= MAX_ITER) begin
            iters     <= it + 1'b1;
            converged <= syn_ok;
            done      <= 1'b1;
            st        <= S_IDLE;
          end else begin
            it  <= it + 1'b1;
            grp <= '0;
            st  <= S_GRP;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);
endmodule
