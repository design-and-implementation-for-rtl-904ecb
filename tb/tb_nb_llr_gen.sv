// Test of the LLR generator: random binary LLRs; the reference ranks all 64
// symbols by their log-domain likelihood. The output must list NM distinct
// symbols whose likelihood profile equals the reference top NM, each symbol
// carrying its own reference likelihood; out_vld comes 65 cycles after the
// input is accepted.
module tb_nb_llr_gen;
  import nb_pkg::*;
  localparam int NM = 8;
  logic clk = 1'b0, rst_n = 1'b0, in_vld = 1'b0, in_rdy, out_vld;
  bllr_vec_t in_bllr, out_bllr;
  elem_t [NM-1:0] out_top;
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
  nb_llr_gen #(.NM(NM)) dut (.*);
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 100; t++) begin
      int cv[64], refl[NM], cyc;
      bit taken[64];
      in_bllr = rand_bllr();
      for (int s = 0; s < 64; s++) begin cv[s] = ref_cv(in_bllr, s); taken[s] = 0; end
      for (int k = 0; k < NM; k++) begin
        int bs;
        bs = -1;
        for (int s = 0; s < 64; s++) if (!taken[s] && (bs < 0 || cv[s] > cv[bs])) bs = s;
        taken[bs] = 1;
        refl[k] = cv[bs];
      end
      @(negedge clk);
      chk(in_rdy, "ready while idle");
      in_vld = 1'b1;
      @(negedge clk);
      in_vld = 1'b0;
      cyc = 1;
      while (!out_vld && cyc < 100) begin @(posedge clk); #1; cyc++; end
      chk(cyc == 65, $sformatf("%0d cycles", cyc));
      chk(out_bllr == in_bllr, "binary LLRs passed on");
      for (int k = 0; k < NM; k++) begin
        chk(out_top[k].vld && int'(out_top[k].llr) == refl[k] && cv[out_top[k].sym] == refl[k],
            $sformatf("trial %0d entry %0d", t, k));
        for (int j = 0; j < k; j++) chk(out_top[j].sym != out_top[k].sym, "repeated symbol");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
