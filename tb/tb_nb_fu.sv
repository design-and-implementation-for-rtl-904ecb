// Test of the function unit (second-stage check step, buffer, inverse
// permutation, VNU, decision). The check step is tested on its own; here its
// output vector (read from inside the unit) is taken as the C2V message, and
// the rest of the chain is recomputed independently: inverse permutation with
// log/antilog tables, the VNU by brute-force candidate selection, the
// decision as the symbol of maximal posterior. Also checks that done comes
// within NM + NC + 8 cycles of start.
module tb_nb_fu;
  import nb_pkg::*;
  localparam int NM = 8, NC = 5, G = -24;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done;
  elem_t [NM-1:0] in1, in2, d_old, d_new;
  sym_t hinv, dec;
  bllr_vec_t bllr;
  elem_t [NC-1:0] ch_top;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask
  // reference symbol likelihood from binary LLRs (log-domain, normalised)
  function automatic int ref_cv(bllr_vec_t bl, int s);
    int raw, mx;
    mx = -100000;
    for (int a = 0; a < 64; a++) begin
      int r;
      r = 0;
      for (int i = 0; i < P; i++) if (a[i]) r -= int'(bl[i]);
      if (r > mx) mx = r;
    end
    raw = 0;
    for (int i = 0; i < P; i++) if (s[i]) raw -= int'(bl[i]);
    raw = raw - mx;
    return (raw < -64) ? -64 : raw;
  endfunction
  function automatic int sat(int v);
    return (v < -64) ? -64 : ((v > 63) ? 63 : v);
  endfunction
  function automatic bllr_vec_t rand_bllr();
    bllr_vec_t b;
    for (int i = 0; i < P; i++) b[i] = bllr_t'($urandom_range(0, 63));
    return b;
  endfunction
  // sorted vector of NM distinct random symbols, best likelihood 0
  function automatic elem_t [7:0] rand_vec();
    elem_t [7:0] v;
    bit used[64];
    int l;
    foreach (used[i]) used[i] = 0;
    l = 0;
    for (int i = 0; i < 8; i++) begin
      sym_t s;
      do s = sym_t'($urandom_range(0, 63)); while (used[s]);
      used[s] = 1;
      v[i] = '{vld: 1'b1, sym: s, llr: llr_t'(l)};
      l = l - $urandom_range(0, 9);
      if (l < -64) l = -64;
    end
    return v;
  endfunction
  // GF(64) by log/antilog tables (x^6 = x + 1)
  int alog[63];
  int lg[64];
  function automatic void gf_init();
    int x;
    x = 1;
    for (int i = 0; i < 63; i++) begin
      alog[i] = x; lg[x] = i;
      x = x << 1;
      if (x & 64) x = (x ^ 64) ^ 3;
    end
  endfunction
  function automatic int gmul(int a, int b);
    return (a == 0 || b == 0) ? 0 : alog[(lg[a] + lg[b]) % 63];
  endfunction
  // reference VNU output (likelihood profile and symbol values) and decision
  function automatic void ref_vnu(elem_t [7:0] u, bllr_vec_t bl, elem_t [4:0] ct, int g,
                                  output int refl[8], output int val[64], output bit cand[64]);
    bit inu[64], taken[64];
    for (int s = 0; s < 64; s++) begin inu[s] = 0; cand[s] = 0; taken[s] = 0; end
    for (int k = 0; k < 8; k++) if (u[k].vld) begin
      inu[u[k].sym] = 1; cand[u[k].sym] = 1;
      val[u[k].sym] = sat(int'(u[k].llr) + ref_cv(bl, int'(u[k].sym)));
    end
    for (int c = 0; c < 5; c++) if (!inu[ct[c].sym]) begin
      cand[ct[c].sym] = 1;
      val[ct[c].sym] = sat(ref_cv(bl, int'(ct[c].sym)) + g);
    end
    for (int k = 0; k < 8; k++) begin
      int bs;
      bs = -1;
      for (int s = 0; s < 64; s++) if (cand[s] && !taken[s] && (bs < 0 || val[s] > val[bs])) bs = s;
      if (bs >= 0) begin taken[bs] = 1; refl[k] = val[bs]; end else refl[k] = -1000;
    end
  endfunction
  function automatic int ref_post_best(elem_t [7:0] u, elem_t [7:0] d, int g, output int post[64]);
    int lu[64], ld[64], best;
    for (int s = 0; s < 64; s++) begin lu[s] = 1000; ld[s] = 1000; post[s] = -2000; end
    for (int k = 0; k < 8; k++) if (u[k].vld) lu[u[k].sym] = int'(u[k].llr);
    for (int k = 0; k < 8; k++) if (d[k].vld) ld[d[k].sym] = int'(d[k].llr);
    best = -2000;
    for (int s = 0; s < 64; s++) if (lu[s] != 1000 || ld[s] != 1000) begin
      post[s] = sat(((lu[s] != 1000) ? lu[s] : g) + ((ld[s] != 1000) ? ld[s] : g));
      if (post[s] > best) best = post[s];
    end
    return best;
  endfunction
  function automatic elem_t [4:0] top_ch(bllr_vec_t bl);
    elem_t [4:0] ct;
    bit taken[64];
    foreach (taken[s]) taken[s] = 0;
    for (int c = 0; c < 5; c++) begin
      int bs;
      bs = -1;
      for (int s = 0; s < 64; s++) if (!taken[s] && (bs < 0 || ref_cv(bl, s) > ref_cv(bl, bs))) bs = s;
      taken[bs] = 1;
      ct[c] = '{vld: 1'b1, sym: sym_t'(bs), llr: llr_t'(ref_cv(bl, bs))};
    end
    return ct;
  endfunction
  nb_fu #(.NM(NM), .NS(5), .NC(NC), .GAMMA(llr_t'(G))) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    gf_init();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      elem_t [NM-1:0] u;
      int refl[8], val[64], post[64], best, cyc;
      bit cand[64];
      in1 = rand_vec();
      in2 = rand_vec();
      d_old = rand_vec();
      hinv = sym_t'($urandom_range(1, 63));
      bllr = rand_bllr();
      ch_top = top_ch(bllr);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done && cyc < 60) begin @(posedge clk); #1; cyc++; end
      chk(cyc <= NM + NC + 8, $sformatf("trial %0d: %0d cycles", t, cyc));
      u = dut.u_ces.o_vec;
      for (int k = 0; k < NM; k++) u[k].sym = sym_t'(gmul(int'(u[k].sym), int'(hinv)));
      ref_vnu(u, bllr, ch_top, G, refl, val, cand);
      for (int k = 0; k < NM; k++) begin
        chk(int'(d_new[k].llr) == sat(refl[k] - refl[0]), $sformatf("trial %0d: entry %0d llr", t, k));
        chk(cand[d_new[k].sym] && sat(val[d_new[k].sym] - refl[0]) == int'(d_new[k].llr),
            $sformatf("trial %0d: entry %0d symbol", t, k));
      end
      best = ref_post_best(u, d_old, G, post);
      chk(post[dec] == best, $sformatf("trial %0d: decision", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
