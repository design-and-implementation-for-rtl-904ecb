// Test of the V2C message memory against a shadow array: bulk load of random
// vectors, then cycles of random reads on all ports and random writes to
// distinct addresses, every read compared with the shadow.
module tb_nb_v2c_mem;
  import nb_pkg::*;
  localparam int NM = 8, W = NVAR, NP = BROWS * DC;
  logic clk = 1'b0, load = 1'b0;
  elem_t [W-1:0][NM-1:0] ldata;
  logic [NP-1:0][$clog2(W)-1:0] raddr, waddr;
  elem_t [NP-1:0][NM-1:0] rdata, wdata;
  logic [NP-1:0] we = '0;
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
  nb_v2c_mem #(.NM(NM)) dut (.*);
  function automatic elem_t [NM-1:0] rnd();
    elem_t [NM-1:0] v;
    for (int i = 0; i < NM; i++) v[i] = elem_t'($urandom());
    return v;
  endfunction
  elem_t [NM-1:0] shadow [W];
  initial begin
    for (int w = 0; w < W; w++) begin ldata[w] = rnd(); shadow[w] = ldata[w]; end
    @(negedge clk); load = 1'b1; @(negedge clk); load = 1'b0;
    for (int t = 0; t < 300; t++) begin
      int perm[W];
      for (int w = 0; w < W; w++) perm[w] = w;
      perm.shuffle();
      for (int p = 0; p < NP; p++) begin
        raddr[p] = ($clog2(W))'($urandom_range(0, W - 1));
        waddr[p] = ($clog2(W))'(perm[p]);
        we[p] = $urandom_range(0, 1) == 1;
        wdata[p] = rnd();
      end
      #1;
      for (int p = 0; p < NP; p++) chk(rdata[p] == shadow[raddr[p]], $sformatf("read port %0d", p));
      @(posedge clk);
      for (int p = 0; p < NP; p++) if (we[p]) shadow[waddr[p]] = wdata[p];
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
