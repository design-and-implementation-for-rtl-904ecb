// Test of the degree-2 variable node unit. Random C2V vectors (streamed in a
// random order with random gaps) and random binary channel LLRs are applied;
// the NC best channel symbols are computed here by brute force. The reference
// builds every candidate (C2V likelihood plus channel likelihood of its
// symbol; channel likelihood plus GAMMA for the best channel symbols absent
// from the C2V vector), keeps the NM best and normalises. Checked: the
// likelihood profile, every symbol carrying its reference likelihood, distinct
// symbols, and NC + 2 cycles from the end of the stream to done.
module tb_nb_vnu;
  import nb_pkg::*;
  localparam int NM = 8, NC = 5, G = -24;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, in_vld = 1'b0, in_end = 1'b0, done;
  bllr_vec_t bllr;
  elem_t [NC-1:0] ch_top;
  elem_t in_elem;
  elem_t [NM-1:0] o_vec;
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
  nb_vnu #(.NM(NM), .NC(NC), .GAMMA(llr_t'(G))) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      elem_t [NM-1:0] u;
      int cv[64], val[64], refl[NM];
      bit inu[64], cand[64], taken[64];
      int ord[NM], cyc;
      u = rand_vec();
      bllr = rand_bllr();
      for (int s = 0; s < 64; s++) begin cv[s] = ref_cv(bllr, s); inu[s] = 0; cand[s] = 0; taken[s] = 0; end
      // best NC channel symbols by brute force
      for (int c = 0; c < NC; c++) begin
        int bs;
        bs = -1;
        for (int s = 0; s < 64; s++) if (!taken[s] && (bs < 0 || cv[s] > cv[bs])) bs = s;
        taken[bs] = 1;
        ch_top[c] = '{vld: 1'b1, sym: sym_t'(bs), llr: llr_t'(cv[bs])};
      end
      for (int k = 0; k < NM; k++) begin
        inu[u[k].sym] = 1; cand[u[k].sym] = 1;
        val[u[k].sym] = sat(int'(u[k].llr) + cv[u[k].sym]);
      end
      for (int c = 0; c < NC; c++) if (!inu[ch_top[c].sym]) begin
        cand[ch_top[c].sym] = 1;
        val[ch_top[c].sym] = sat(cv[ch_top[c].sym] + G);
      end
      foreach (taken[s]) taken[s] = 0;
      for (int k = 0; k < NM; k++) begin
        int bs;
        bs = -1;
        for (int s = 0; s < 64; s++) if (cand[s] && !taken[s] && (bs < 0 || val[s] > val[bs])) bs = s;
        taken[bs] = 1;
        refl[k] = val[bs];
      end
      for (int k = 0; k < NM; k++) ord[k] = k;
      ord.shuffle();
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      for (int k = 0; k < NM; k++) begin
        while ($urandom_range(0, 2) == 0) @(negedge clk);
        in_vld = 1'b1;
        in_elem = u[ord[k]];
        @(negedge clk);
        in_vld = 1'b0;
      end
      in_end = 1'b1;
      cyc = 0;
      while (!done && cyc < 50) begin @(posedge clk); #1; cyc++; end
      in_end = 1'b0;
      chk(cyc <= NC + 2, $sformatf("trial %0d: %0d cycles after the stream", t, cyc));
      for (int k = 0; k < NM; k++) begin
        chk(int'(o_vec[k].llr) == sat(refl[k] - refl[0]), $sformatf("trial %0d: entry %0d llr %0d expected %0d", t, k, o_vec[k].llr, refl[k] - refl[0]));
        chk(o_vec[k].vld && cand[o_vec[k].sym] && sat(val[o_vec[k].sym] - refl[0]) == int'(o_vec[k].llr),
            $sformatf("trial %0d: entry %0d symbol/likelihood mismatch", t, k));
        for (int j = 0; j < k; j++) chk(o_vec[j].sym != o_vec[k].sym, "repeated symbol");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
