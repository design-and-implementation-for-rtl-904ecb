// Exhaustive test of the GF(64) multiplier against log/antilog tables built
// here by repeated multiplication with the primitive element (x^6 = x + 1):
// a*b = alog[(log a + log b) mod 63], and 0 times anything is 0.
module tb_nb_gf_mul;
  import nb_pkg::*;
  sym_t a, b, y;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask
  nb_gf_mul dut (.*);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int alog[63];
    int lg[64];
    int x;
    x = 1;
    for (int i = 0; i < 63; i++) begin
      alog[i] = x;
      lg[x]   = i;
      x = x << 1;
      if (x & 64) x = (x ^ 64) ^ 3;
    end
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        int r;
        a = sym_t'(i);
        b = sym_t'(j);
        #1;
        r = (i == 0 || j == 0) ? 0 : alog[(lg[i] + lg[j]) % 63];
        chk(int'(y) == r, $sformatf("%0d * %0d = %0d, expected %0d", i, j, y, r));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
