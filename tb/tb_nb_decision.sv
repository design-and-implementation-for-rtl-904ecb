// Test of the decision unit. Random stored V2C vectors and C2V vectors that
// share a random number of symbols; the reference posterior of every symbol
// in either vector is the sum of its two likelihoods, with GAMMA standing in
// for a missing one. The decision must be a symbol of maximal posterior.
module tb_nb_decision;
  import nb_pkg::*;
  localparam int NM = 8, G = -24;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, in_vld = 1'b0, fin = 1'b0, done;
  elem_t [NM-1:0] d_old;
  elem_t in_elem;
  sym_t dec;
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
  nb_decision #(.NM(NM), .GAMMA(llr_t'(G))) dut (.*);
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
    for (int t = 0; t < 400; t++) begin
      elem_t [NM-1:0] u;
      int lu[64], ld[64], best, cyc;
      u = rand_vec();
      d_old = rand_vec();
      // let some symbols coincide
      for (int k = 0; k < NM; k++) if ($urandom_range(0, 1) == 0) begin
        bit dupl;
        dupl = 0;
        for (int j = 0; j < NM; j++) if (d_old[j].sym == u[k].sym) dupl = 1;
        if (!dupl) d_old[k].sym = u[k].sym;
      end
      // keep d_old symbols distinct
      for (int k = 0; k < NM; k++) for (int j = 0; j < k; j++)
        if (d_old[k].sym == d_old[j].sym) d_old[k].vld = 1'b0;
      for (int s = 0; s < 64; s++) begin lu[s] = 1000; ld[s] = 1000; end
      for (int k = 0; k < NM; k++) lu[u[k].sym] = int'(u[k].llr);
      for (int k = 0; k < NM; k++) if (d_old[k].vld) ld[d_old[k].sym] = int'(d_old[k].llr);
      best = -1000;
      for (int s = 0; s < 64; s++) if (lu[s] != 1000 || ld[s] != 1000) begin
        int p;
        p = sat(((lu[s] != 1000) ? lu[s] : G) + ((ld[s] != 1000) ? ld[s] : G));
        if (p > best) best = p;
      end
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      for (int k = 0; k < NM; k++) begin
        in_vld = 1'b1;
        in_elem = u[k];
        @(negedge clk);
      end
      in_vld = 1'b0;
      fin = 1'b1;
      @(negedge clk);
      fin = 1'b0;
      cyc = 0;
      while (!done && cyc < 5) begin @(posedge clk); #1; cyc++; end
      chk(done || cyc == 0, "no done pulse");
      begin
        int p;
        p = (lu[dec] != 1000 || ld[dec] != 1000) ?
            sat(((lu[dec] != 1000) ? lu[dec] : G) + ((ld[dec] != 1000) ? ld[dec] : G)) : -2000;
        chk(p == best, $sformatf("trial %0d: decision %0d posterior %0d, best %0d", t, dec, p, best));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
