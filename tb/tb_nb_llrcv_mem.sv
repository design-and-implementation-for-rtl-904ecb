// Test of the channel memory: two bulk loads of random words, each followed
// by random reads on all ports compared with the loaded data.
module tb_nb_llrcv_mem;
  import nb_pkg::*;
  localparam int NC = 5, W = NVAR, NP = BROWS * DC;
  logic clk = 1'b0, load = 1'b0;
  bllr_vec_t [W-1:0] lbllr;
  elem_t [W-1:0][NC-1:0] ltop;
  logic [NP-1:0][$clog2(W)-1:0] raddr;
  bllr_vec_t [NP-1:0] rbllr;
  elem_t [NP-1:0][NC-1:0] rtop;
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
  nb_llrcv_mem #(.NC(NC)) dut (.*);
  initial begin
    for (int f = 0; f < 2; f++) begin
      bllr_vec_t sb [W];
      elem_t [NC-1:0] st [W];
      for (int w = 0; w < W; w++) begin
        lbllr[w] = bllr_vec_t'({$urandom(), $urandom()});
        for (int c = 0; c < NC; c++) ltop[w][c] = elem_t'($urandom());
        sb[w] = lbllr[w];
        st[w] = ltop[w];
      end
      @(negedge clk); load = 1'b1; @(negedge clk); load = 1'b0;
      for (int w = 0; w < W; w++) begin lbllr[w] = '0; ltop[w] = '0; end
      for (int t = 0; t < 100; t++) begin
        for (int p = 0; p < NP; p++) raddr[p] = ($clog2(W))'($urandom_range(0, W - 1));
        #1;
        for (int p = 0; p < NP; p++)
          chk(rbllr[p] == sb[raddr[p]] && rtop[p] == st[raddr[p]], $sformatf("port %0d", p));
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
