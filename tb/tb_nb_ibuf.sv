// Test of the internal buffer: bursts of zero, one or two elements per cycle
// (at most NM per burst, as a check step delivers them) are pushed; a
// scoreboard checks that elements leave one per cycle, in arrival order,
// whenever one is available, that nothing is lost, and that the buffer never
// holds more than NM/2 elements.
module tb_nb_ibuf;
  import nb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [1:0] in_vld = '0;
  elem_t [1:0] in_elem;
  logic out_vld, empty;
  elem_t out_elem;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask
  nb_ibuf #(.DEPTH(4)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  elem_t q[$];
  int seq = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int burst = 0; burst < 300; burst++) begin
      int left;
      left = 8;
      while (left > 0 || q.size() > 0) begin
        @(negedge clk);
        in_vld = '0;
        for (int k = 0; k < 2; k++)
          if (left > 0 && $urandom_range(0, 3) != 0) begin
            in_vld[k] = 1'b1;
            in_elem[k] = '{vld: 1'b1, sym: sym_t'(seq), llr: llr_t'(-(seq % 60))};
            q.push_back(in_elem[k]);
            seq++;
            left--;
          end
        #1;
        chk(out_vld == (q.size() > 0), "output valid whenever an element is available");
        if (out_vld && q.size() > 0) begin
          chk(out_elem == q[0], $sformatf("order: got sym %0d expected %0d", out_elem.sym, q[0].sym));
          void'(q.pop_front());
        end
        chk(q.size() <= 4, "more than NM/2 elements held");
        @(posedge clk);
      end
      @(negedge clk);
      in_vld = '0;
      chk(empty, "empty after a burst");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
