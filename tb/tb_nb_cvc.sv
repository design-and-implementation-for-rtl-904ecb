// Test of the channel value calculator. The reference works in the plain
// log-probability domain: log P(s) is, up to a constant, the sum of -LLR_i
// over the bits of s that are 1 (LLR = log P(0)/P(1)); the normalised
// likelihood is that sum minus its maximum over all 64 symbols, saturated at
// -64. Random binary LLRs, every symbol.
module tb_nb_cvc;
  import nb_pkg::*;
  bllr_vec_t bllr;
  sym_t sym;
  llr_t llr;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask
  nb_cvc dut (.*);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 200; t++) begin
      int raw[64];
      int mx;
      for (int i = 0; i < P; i++)
        bllr[i] = bllr_t'((t < 3) ? ((t == 0) ? 0 : (t == 1 ? 31 : -32)) : $urandom_range(0, 63));
      mx = -100000;
      for (int s = 0; s < 64; s++) begin
        raw[s] = 0;
        for (int i = 0; i < P; i++) if (s[i]) raw[s] -= int'(bllr[i]);
        if (raw[s] > mx) mx = raw[s];
      end
      for (int s = 0; s < 64; s++) begin
        int r;
        sym = sym_t'(s);
        #1;
        r = raw[s] - mx;
        if (r < -64) r = -64;
        chk(int'(llr) == r, $sformatf("trial %0d sym %0d: %0d expected %0d", t, s, llr, r));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
