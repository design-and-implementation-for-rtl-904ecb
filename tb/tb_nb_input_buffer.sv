// Test of the input buffer: three frames of random entries are written in
// variable order with random gaps; full must rise exactly after the last
// entry, the parallel outputs must hold the frame, and after take the next
// frame is accepted.
module tb_nb_input_buffer;
  import nb_pkg::*;
  localparam int NM = 8, W = NVAR;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0, take = 1'b0, full;
  bllr_vec_t wbllr;
  elem_t [NM-1:0] wtop;
  bllr_vec_t [W-1:0] rd_bllr;
  elem_t [W-1:0][NM-1:0] rd_top;
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
  nb_input_buffer #(.NM(NM)) dut (.*);
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 3; f++) begin
      bllr_vec_t sb [W];
      elem_t [NM-1:0] st [W];
      for (int w = 0; w < W; w++) begin
        @(negedge clk);
        chk(!full, "full too early");
        while ($urandom_range(0, 3) == 0) @(negedge clk);
        sb[w] = bllr_vec_t'({$urandom(), $urandom()});
        for (int i = 0; i < NM; i++) st[w][i] = elem_t'($urandom());
        wbllr = sb[w];
        wtop = st[w];
        we = 1'b1;
        @(negedge clk);
        we = 1'b0;
      end
      chk(full, "full after the last entry");
      for (int w = 0; w < W; w++) chk(rd_bllr[w] == sb[w] && rd_top[w] == st[w], $sformatf("entry %0d", w));
      take = 1'b1;
      @(negedge clk);
      take = 1'b0;
      chk(!full, "free after take");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
