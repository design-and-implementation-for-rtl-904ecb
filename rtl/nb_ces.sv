// Check elementary step (CES) with the double-throughput L-bubble check.
//
// A CES combines two sorted message vectors I1 and I2 (NM elements each) into
// one output vector O: every pair (i,j) forms the candidate symbol
// I1.sym[i] ^ I2.sym[j] with likelihood I1.llr[i] + I2.llr[j] (the candidate
// map M[i][j]); O receives the NM most likely distinct symbols. Instead of
// exploring all NM*NM entries, a sorter of NS entries holds the frontier of
// the exploration; every cycle its two best entries are popped (two outputs
// per cycle, which halves the 2*NM cycles of a one-output CES), checked for
// symbols already in O, and replaced by two new candidates:
//   * region a, the first row and the lower part of the first column of M,
//     is treated as one merged stream with two pointers (next unexplored
//     column of row 0, next unexplored row of column 0). The four entries
//     x = M[0][xr], y = M[0][xr+1], m = M[yc][0], n = M[yc+1][0] are compared
//     and the two best become the region-a candidates Ca1, Ca2;
//   * region b, the other bubbles, follow fixed L-shaped paths: bubble k
//     starts at M[k][0] (1 <= k <= NS-3), moves right along row k until it
//     reaches the anti-diagonal r + c = NS-2, then moves down its column.
//     The successor of a popped region-b entry (r,c) is therefore M[r][c+1]
//     when r + c < NS-2 and M[r+1][c] otherwise.
// Two region-a pops take Ca1 and Ca2, one region-a pop takes Ca1 and the
// path successor of the other pop, two region-b pops take both successors.
// The sorter is initialised with NS-1 entries of the first column and M[0][1].
// The merge-of-four comparison, the region split, the initial sorter contents
// and the 2-per-cycle operation follow the decoder this RTL implements; the
// exact L paths of region b are this design's own choice.
//
// Interface and timing: pulse start with in1/in2 valid (they are captured).
// One cycle later the sorter is initialised, then T processing cycles follow
// (T = NM by default), ending early once O is full. done pulses with o_vec
// final; o_vec stays valid until the next start. Because two pops of one cycle
// are not always in global order, new elements are inserted into o_vec in
// likelihood order rather than appended. Every newly accepted output
// element is also presented on s_push/s_elem (up to two per cycle), which the
// function unit uses to start its variable node update before O is complete.
// Unfilled O entries keep vld = 0.
module nb_ces
  import nb_pkg::*;
#(
  parameter int unsigned NM = 8,
  parameter int unsigned NS = 5,
  parameter int unsigned T  = NM
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  elem_t [NM-1:0] in1,
  input  elem_t [NM-1:0] in2,
  output logic           busy,
  output logic           done,
  output elem_t [NM-1:0] o_vec,
  output logic  [1:0]    s_push,
  output elem_t [1:0]    s_elem
);
  localparam int unsigned IW = $clog2(NM + 3);
  localparam int unsigned CW = $clog2(T + 1);
  localparam int unsigned OW = $clog2(NM + 1);

  typedef logic [IW-1:0] idx_t;
  typedef struct packed {
    logic vld;
    idx_t r;
    idx_t c;
    sym_t sym;
    llr_t llr;
  } ent_t;

  typedef enum logic [1:0] {S_IDLE, S_INIT, S_RUN} state_t;

  state_t          st;
  elem_t [NM-1:0]  a, b;
  ent_t  [NS-1:0]  srt;
  idx_t            xr, yc;
  logic  [CW-1:0]  cyc;
  logic  [OW-1:0]  n;

  // Entry of the candidate map (invalid outside the vectors).
  function automatic ent_t mval(elem_t [NM-1:0] va, elem_t [NM-1:0] vb, idx_t r, idx_t c);
    ent_t e;
    e     = '0;
    e.r   = r;
    e.c   = c;
    if (r < idx_t'(NM) && c < idx_t'(NM)) begin
      e.vld = va[r[$clog2(NM)-1:0]].vld && vb[c[$clog2(NM)-1:0]].vld;
      e.sym = va[r[$clog2(NM)-1:0]].sym ^ vb[c[$clog2(NM)-1:0]].sym;
      e.llr = sat_add(va[r[$clog2(NM)-1:0]].llr, vb[c[$clog2(NM)-1:0]].llr);
    end
    return e;
  endfunction

  // p at least as likely as q (an invalid entry is the least likely)
  function automatic logic ge(ent_t p, ent_t q);
    return p.vld && (!q.vld || p.llr >= q.llr);
  endfunction

  function automatic logic in_region_a(ent_t e);
    return e.vld && (e.r == '0 || (e.c == '0 && e.r >= idx_t'(NS - 2)));
  endfunction

  function automatic ent_t path_next(elem_t [NM-1:0] va, elem_t [NM-1:0] vb, ent_t e);
    ent_t s;
    if (!e.vld)                                   s = '0;
    else if (32'(e.r) + 32'(e.c) < NS - 2)        s = mval(va, vb, e.r, e.c + idx_t'(1));
    else                                          s = mval(va, vb, e.r + idx_t'(1), e.c);
    return s;
  endfunction

  // Stable sort by likelihood via ranks.
  function automatic ent_t [NS-1:0] sort_pool(ent_t [NS-1:0] p);
    ent_t [NS-1:0] o;
    int unsigned   rk;
    o = '0;
    for (int i = 0; i < NS; i++) begin
      rk = 0;
      for (int j = 0; j < NS; j++) begin
        if (j != i) begin
          if (p[j].vld && !p[i].vld) rk++;
          else if (p[j].vld == p[i].vld) begin
            if (p[j].vld && p[j].llr > p[i].llr) rk++;
            else if ((!p[j].vld || p[j].llr == p[i].llr) && j < i) rk++;
          end
        end
      end
      o[rk] = p[i];
    end
    return o;
  endfunction

  function automatic logic in_out(elem_t [NM-1:0] o, sym_t s);
    logic f;
    f = 1'b0;
    for (int k = 0; k < NM; k++) if (o[k].vld && o[k].sym == s) f = 1'b1;
    return f;
  endfunction

  // Sorted insertion into the output vector (the least likely entry drops out).
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

  // ---------------------------------------------------------------- one step
  ent_t          e0, e1, x, y, m, nn, ca1, ca2, c0, c1;
  logic          ca1_row, ca2_row;
  logic          a0, a1;
  idx_t          xr_n, yc_n;
  ent_t [NS-1:0] pool, srt_n, init_pool;
  logic          u0, u1, app0, app1;
  logic [OW-1:0] n_n;
  elem_t [NM-1:0] o_n;

  always_comb begin
    e0 = srt[0];
    e1 = srt[1];
    x  = mval(a, b, '0, xr);
    y  = mval(a, b, '0, xr + idx_t'(1));
    m  = mval(a, b, yc, '0);
    nn = mval(a, b, yc + idx_t'(1), '0);
    // best two of the merged row-0 / column-0 stream
    if (ge(x, m)) begin
      ca1 = x; ca1_row = 1'b1;
      if (m.vld && !ge(y, m)) begin ca2 = m; ca2_row = 1'b0; end
      else                    begin ca2 = y; ca2_row = 1'b1; end
    end else begin
      ca1 = m; ca1_row = 1'b0;
      if (ge(x, nn)) begin ca2 = x;  ca2_row = 1'b1; end
      else           begin ca2 = nn; ca2_row = 1'b0; end
    end
    a0   = in_region_a(e0);
    a1   = in_region_a(e1);
    xr_n = xr;
    yc_n = yc;
    if (a0 && a1) begin
      c0   = ca1;
      c1   = ca2;
      xr_n = xr + idx_t'(ca1_row) + idx_t'(ca2_row);
      yc_n = yc + idx_t'(!ca1_row) + idx_t'(!ca2_row);
    end else if (a0 || a1) begin
      c0   = ca1;
      c1   = a0 ? path_next(a, b, e1) : path_next(a, b, e0);
      xr_n = xr + idx_t'(ca1_row);
      yc_n = yc + idx_t'(!ca1_row);
    end else begin
      c0 = path_next(a, b, e0);
      c1 = path_next(a, b, e1);
    end
    if (xr_n > idx_t'(NM)) xr_n = idx_t'(NM);
    if (yc_n > idx_t'(NM)) yc_n = idx_t'(NM);

    pool = '0;
    for (int i = 2; i < NS; i++) pool[i-2] = srt[i];
    pool[NS-2] = c0;
    pool[NS-1] = c1;
    srt_n = sort_pool(pool);

    // redundancy check against the output vector and between the two pops
    u0   = e0.vld && !in_out(o_vec, e0.sym);
    u1   = e1.vld && !in_out(o_vec, e1.sym) && !(e0.vld && e0.sym == e1.sym);
    app0 = u0 && (n < OW'(NM));
    app1 = u1 && ((n + OW'(app0)) < OW'(NM));
    o_n  = o_vec;
    if (app0) o_n = ins_sorted(o_n, '{vld: 1'b1, sym: e0.sym, llr: e0.llr});
    if (app1) o_n = ins_sorted(o_n, '{vld: 1'b1, sym: e1.sym, llr: e1.llr});
    n_n  = n + OW'(app0) + OW'(app1);

    init_pool = '0;
    for (int i = 0; i < NS - 1; i++) init_pool[i] = mval(a, b, idx_t'(i), '0);
    init_pool[NS-1] = mval(a, b, '0, idx_t'(1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      a      <= '0;
      b      <= '0;
      srt    <= '0;
      xr     <= '0;
      yc     <= '0;
      cyc    <= '0;
      n      <= '0;
      o_vec  <= '0;
      done   <= 1'b0;
      s_push <= '0;
      s_elem <= '0;
    end else begin
      done   <= 1'b0;
      s_push <= '0;
      unique case (st)
        S_IDLE: if (start) begin
          a  <= in1;
          b  <= in2;
          st <= S_INIT;
        end
        S_INIT: begin
          srt   <= sort_pool(init_pool);
          xr    <= idx_t'(2);
          yc    <= idx_t'(NS - 1);
          cyc   <= '0;
          n     <= '0;
          o_vec <= '0;
          st    <= S_RUN;
        end
        S_RUN: begin
          srt    <= srt_n;
          xr     <= xr_n;
          yc     <= yc_n;
          o_vec  <= o_n;
          n      <= n_n;
          cyc    <= cyc + CW'(1);
          s_push <= {app1, app0};
          s_elem[0] <= '{vld: 1'b1, sym: e0.sym, llr: e0.llr};
          s_elem[1] <= '{vld: 1'b1, sym: e1.sym, llr: e1.llr};
          if (cyc == CW'(T - 1) || n_n == OW'(NM)) begin
            done <= 1'b1;
            st   <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

  // start is only accepted while idle
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> st == S_IDLE);

endmodule
