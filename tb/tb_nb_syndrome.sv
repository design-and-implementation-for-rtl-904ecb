// Test of the syndrome check. The reference walks the 56 checks of the
// quasi-cyclic matrix and sums coefficient times symbol with log/antilog
// tables. Words: all zero (every check holds), random words, and words with
// one non-zero symbol (exactly two checks fail). ok must equal the reference,
// done must come R + 1 cycles after start.
module tb_nb_syndrome;
  import nb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, ok, done;
  sym_t [NVAR-1:0] dec;
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
  nb_syndrome dut (.*);
  function automatic int nfail();
    int n;
    n = 0;
    for (int b = 0; b < BROWS; b++)
      for (int k = 0; k < R; k++) begin
        int s;
        s = 0;
        for (int e = 0; e < DC; e++)
          s ^= gmul(alog[(11 * b + 5 * k + 17 * e + 3) % 63],
                    int'(dec[R * H_COL[b][e] + (k + H_SHIFT[b][e]) % R]));
        if (s != 0) n++;
      end
    return n;
  endfunction
  initial begin
    gf_init();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      int nf, cyc;
      dec = '0;
      if (t % 3 == 1) for (int v = 0; v < NVAR; v++) dec[v] = sym_t'($urandom_range(0, 63));
      if (t % 3 == 2) dec[$urandom_range(0, NVAR - 1)] = sym_t'($urandom_range(1, 63));
      nf = nfail();
      if (t % 3 == 0) chk(nf == 0, "reference: zero word");
      if (t % 3 == 2) chk(nf == 2, "reference: one symbol hits two checks");
      @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
      cyc = 1;
      while (!done && cyc < 40) begin @(posedge clk); #1; cyc++; end
      chk(cyc == R + 1, $sformatf("%0d cycles", cyc));
      chk(ok == (nf == 0), $sformatf("trial %0d: ok %0d, failing checks %0d", t, ok, nf));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
