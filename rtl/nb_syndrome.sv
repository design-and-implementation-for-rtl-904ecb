// Syndrome check for early termination. After every iteration the hard
// decisions of all variable nodes are checked against all parity checks:
// check m = (b, k) (row k of block row b) is satisfied when the GF(64) sum
// of h(b,k,e) * dec[var(b,k,e)] over its four edges is zero. One row index k
// is checked per cycle for all block rows at once, so a full check takes R = 8
// cycles. ok is valid with the done pulse and tells whether every check holds.
module nb_syndrome
  import nb_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  sym_t [NVAR-1:0]   dec,
  output logic              ok,
  output logic              done
);
  logic                 run;
  logic [$clog2(R)-1:0] k;
  logic                 bad;
  logic                 all_ok;

  always_comb begin
    bad = 1'b0;
    for (int b = 0; b < BROWS; b++) begin
      sym_t s;
      s = '0;
      for (int e = 0; e < DC; e++)
        s ^= gf_mul(h_coef(b, 32'(k), e), dec[h_var(b, 32'(k), e)]);
      if (s != '0) bad = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run    <= 1'b0;
      k      <= '0;
      all_ok <= 1'b1;
      ok     <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        run    <= 1'b1;
        k      <= '0;
        all_ok <= 1'b1;
      end else if (run) begin
        k <= k + 1'b1;
        if (32'(k) == R - 1) begin
          run  <= 1'b0;
          ok   <= all_ok && !bad;
          done <= 1'b1;
        end else if (bad) begin
          all_ok <= 1'b0;
        end
      end
    end
  end
endmodule
