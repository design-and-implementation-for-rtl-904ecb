// Self-checking testbench of the double-throughput check elementary step.
// Random sorted input vectors with distinct symbols are applied; the output
// vector is checked against an exhaustive reference computed here over all
// NM*NM pairs: output sorted, symbols distinct, every element a real pair of
// the candidate map, the two best entries exact, no entry better than the
// exact entry of the same rank, the streamed elements the same set as the vector,
// and the processing time at most NM cycles plus two cycles of set-up.
module tb_nb_ces;
  import nb_pkg::*;
  localparam int unsigned NM = 8;
  localparam int unsigned NS = 5;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  elem_t [NM-1:0] in1, in2, o_vec;
  logic busy, done;
  logic [1:0] s_push;
  elem_t [1:0] s_elem;
  int checks = 0, failures = 0;

  nb_ces #(.NM(NM), .NS(NS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic elem_t [NM-1:0] rand_vec();
    elem_t [NM-1:0] v;
    bit used[64];
    int l;
    foreach (used[i]) used[i] = 0;
    l = 0;
    for (int i = 0; i < NM; i++) begin
      sym_t s;
      do s = sym_t'($urandom_range(0, 63)); while (used[s]);
      used[s] = 1;
      v[i].vld = 1'b1;
      v[i].sym = s;
      v[i].llr = llr_t'(l);
      l = l - $urandom_range(0, 9);
      if (l < -64) l = -64;
    end
    return v;
  endfunction

  // exhaustive reference: best likelihood of every symbol, then top NM
  function automatic void ref_ces(elem_t [NM-1:0] p, elem_t [NM-1:0] q, output int best[64],
                                  output int top[NM]);
    bit taken[64];
    for (int s = 0; s < 64; s++) begin best[s] = -1000; taken[s] = 0; end
    for (int i = 0; i < NM; i++)
      for (int j = 0; j < NM; j++) begin
        int s, l;
        s = int'(p[i].sym ^ q[j].sym);
        l = int'(sat_add(p[i].llr, q[j].llr));
        if (l > best[s]) best[s] = l;
      end
    for (int k = 0; k < NM; k++) begin
      int bs;
      bs = -1;
      for (int s = 0; s < 64; s++)
        if (!taken[s] && best[s] > -1000 && (bs < 0 || best[s] > best[bs])) bs = s;
      taken[bs] = 1;
      top[k] = best[bs];
    end
  endfunction

  initial begin
    int best[64];
    int top[NM];
    int cyc, nstream, exact;
    elem_t [NM-1:0] streamed;
    exact = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      in1 = rand_vec();
      in2 = rand_vec();
      ref_ces(in1, in2, best, top);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      nstream = 0;
      streamed = '0;
      while (!done && cyc < 100) begin
        @(posedge clk);
        #1;
        for (int k = 0; k < 2; k++)
          if (s_push[k]) begin
            if (nstream < NM) streamed[nstream] = s_elem[k];
            nstream++;
          end
        cyc++;
      end
      chk(cyc <= NM + 2, $sformatf("trial %0d: %0d cycles", t, cyc));
      for (int k = 0; k < NM; k++) begin
        bit pair_ok;
        chk(o_vec[k].vld, $sformatf("trial %0d: entry %0d empty", t, k));
        pair_ok = 0;
        for (int i = 0; i < NM; i++)
          for (int j = 0; j < NM; j++)
            if ((in1[i].sym ^ in2[j].sym) == o_vec[k].sym &&
                sat_add(in1[i].llr, in2[j].llr) == o_vec[k].llr) pair_ok = 1;
        chk(pair_ok, $sformatf("trial %0d: entry %0d not in candidate map", t, k));
        chk(int'(o_vec[k].llr) <= top[k], $sformatf("trial %0d: entry %0d above exact", t, k));
        if (int'(o_vec[k].llr) == top[k]) exact++;
        if (k > 0) chk(o_vec[k].llr <= o_vec[k-1].llr, $sformatf("trial %0d: not sorted at %0d", t, k));
        for (int j = 0; j < k; j++)
          chk(o_vec[k].sym != o_vec[j].sym, $sformatf("trial %0d: symbol repeated %0d/%0d", t, j, k));
      end
      chk(int'(o_vec[0].llr) == top[0] && int'(o_vec[1].llr) == top[1],
          $sformatf("trial %0d: best two not exact", t));
      chk(nstream == NM, $sformatf("trial %0d: %0d elements streamed", t, nstream));
      for (int k = 0; k < NM; k++) begin
        bit f;
        f = 0;
        for (int j = 0; j < NM; j++) if (streamed[j] == o_vec[k]) f = 1;
        chk(f, $sformatf("trial %0d: entry %0d never streamed", t, k));
      end
    end
    $display("entries equal to exhaustive EMS: %0d of %0d", exact, 300 * NM);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
