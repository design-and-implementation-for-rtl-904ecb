// Test of the layered decoder core without the LLR generator: the initial
// symbol lists are computed here by brute force from the binary LLRs. Frames
// carry the all-zero codeword with a controlled number of corrupted symbols
// (binary LLRs of random sign pattern and magnitude) on top of clean ones.
// Checks: a clean frame converges in one iteration; frames with a few
// corrupted symbols decode to all zero; a frame with most symbols corrupted
// runs to the iteration limit without converging; a converged frame is the
// zero word; an iteration takes at most 8*(2*NM+NC+13) + R + 3 cycles.
module tb_nb_decoder;
  import nb_pkg::*;
  localparam int NM = 8, MAXIT = 10;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done, converged;
  bllr_vec_t [NVAR-1:0] ld_bllr;
  elem_t [NVAR-1:0][NM-1:0] ld_top;
  sym_t [NVAR-1:0] dec_out;
  logic [7:0] iters;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
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
  nb_decoder dut (.*);
  int nbad[6] = '{0, 3, 6, 10, 14, 100};
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 6; f++) begin
      bit bad[NVAR];
      int nerr, cyc;
      foreach (bad[v]) bad[v] = 0;
      for (int i = 0; i < nbad[f] && i < NVAR; i++) bad[(f == 5) ? i : $urandom_range(0, NVAR - 1)] = 1;
      for (int v = 0; v < NVAR; v++) begin
        int cv[64];
        bit taken[64];
        for (int i = 0; i < P; i++)
          ld_bllr[v][i] = bad[v] ? bllr_t'($urandom_range(0, 1) ? -$urandom_range(2, 12) : $urandom_range(0, 6))
                                 : bllr_t'($urandom_range(6, 20));
        for (int s = 0; s < 64; s++) begin cv[s] = ref_cv(ld_bllr[v], s); taken[s] = 0; end
        for (int k = 0; k < NM; k++) begin
          int bs;
          bs = -1;
          for (int s = 0; s < 64; s++) if (!taken[s] && (bs < 0 || cv[s] > cv[bs])) bs = s;
          taken[bs] = 1;
          ld_top[v][k] = '{vld: 1'b1, sym: sym_t'(bs), llr: llr_t'(cv[bs])};
        end
      end
      @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
      cyc = 1;
      while (!done && cyc < 20000) begin @(posedge clk); #1; cyc++; end
      nerr = 0;
      for (int v = 0; v < NVAR; v++) if (dec_out[v] != '0) nerr++;
      $display("frame %0d: %0d corrupted symbols, %0d decoded errors, %0d iterations, converged %0d, %0d cycles",
               f, nbad[f], nerr, iters, converged, cyc);
      chk(done, "frame finished");
      chk(cyc <= int'(iters) * (8 * (2 * NM + 5 + 13) + R + 3) + 2, "iteration length");
      if (converged) chk(nerr == 0, "converged to the zero word");
      if (f == 0) chk(converged && iters == 1, "clean frame in one iteration");
      if (f >= 1 && f <= 2) chk(converged && nerr == 0, "few errors corrected");
      if (f == 5) chk(!converged && iters == MAXIT, "hopeless frame reaches the limit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
