// End-to-end testbench of the decoder core at its default size: the
// (112,56) GF(64) code, NM = 8, NS = 5, seven processing elements, at most
// 10 iterations. The all-zero codeword (a codeword of every linear code) is
// sent over a BPSK/AWGN channel, modelled here with Box-Muller noise, and
// the binary LLRs (4*y/sigma^2, rounded to 6 bits) are streamed in frame after
// frame without pause, so the next frame is loaded while the current one is
// decoded. Frames: two almost noiseless, three at moderate noise, one at very
// heavy noise. Checks: every frame comes out in order; a converged frame is the
// all-zero codeword; the low-noise frames converge within two iterations; the
// heavy frame stops at the iteration limit; a frame that converges never uses
// more than the limit; one group takes at most 2*NM+NC+13 cycles
// (two check stages of NM+2 cycles, NC+1 VNU cycles after the stream, and
// eleven cycles of hand-over between the stages and the memories). Counted
// mechanisms (each must occur): early termination, stop at the iteration limit,
// a frame loaded during decoding, redundant symbols dropped by a check step,
// two new elements buffered in one cycle, the VNU fed from the buffer with no
// new element, channel symbols inserted by a VNU, corrected channel errors.
module tb_nbldpc_top;
  import nb_pkg::*;

  localparam int NFR = 6;
  localparam int MAXIT = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_vld = 1'b0, in_rdy, done, converged, dec_busy;
  bllr_vec_t in_bllr;
  sym_t [NVAR-1:0] dec_out;
  logic [7:0] iters;
  int checks = 0, failures = 0;

  nbldpc_top dut (.*);

  always #5 clk = ~clk;

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  real sig[NFR] = '{0.25, 0.3, 0.55, 0.6, 0.6, 1.6};
  int  ch_err[NFR];

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000000.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  // ---- mechanism counters (probing inside the design)
  int n_early = 0, n_maxit = 0, n_overlap = 0, n_dup = 0, n_buf2 = 0, n_bufonly = 0;
  int n_chins = 0, n_corrected = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_gen.out_vld && dut.dec_busy) n_overlap++;
    // first check step of PE 0, and the function unit of its first edge
    if (dut.u_dec.g_pe[0].u_pe.u_ces12.st == 2'd2 &&
        dut.u_dec.g_pe[0].u_pe.u_ces12.e0.vld && !dut.u_dec.g_pe[0].u_pe.u_ces12.u0) n_dup++;
    if (dut.u_dec.g_pe[0].u_pe.g_fu[0].u_fu.s_push == 2'b11) n_buf2++;
    if (dut.u_dec.g_pe[0].u_pe.g_fu[0].u_fu.s_push == 2'b00 &&
        dut.u_dec.g_pe[0].u_pe.g_fu[0].u_fu.b_vld) n_bufonly++;
    if (dut.u_dec.g_pe[0].u_pe.g_fu[0].u_fu.u_vnu.st == 2'd2 &&
        dut.u_dec.g_pe[0].u_pe.g_fu[0].u_fu.u_vnu.ch_e.vld &&
        !dut.u_dec.g_pe[0].u_pe.g_fu[0].u_fu.u_vnu.seen[dut.u_dec.g_pe[0].u_pe.g_fu[0].u_fu.u_vnu.ch_e.sym])
      n_chins++;
  end

  // group length
  int unsigned grp_start = 0, grp_max = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_dec.pe_start) grp_start = cyc;
    if (dut.u_dec.st == 3'd3 && cyc - grp_start > grp_max) grp_max = cyc - grp_start;
  end

  // ---- stimulus: all frames back to back
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NFR; f++) begin
      ch_err[f] = 0;
      for (int v = 0; v < NVAR; v++) begin
        bit wrong;
        wrong = 0;
        for (int i = 0; i < P; i++) begin
          real y, l;
          int q;
          y = 1.0 + sig[f] * gauss();
          l = 4.0 * y / (sig[f] * sig[f]);
          q = (l >= 0.0) ? int'(l + 0.5) : -int'(-l + 0.5);
          if (q > 31) q = 31;
          if (q < -32) q = -32;
          in_bllr[i] = bllr_t'(q);
          if (q < 0) wrong = 1;
        end
        if (wrong) ch_err[f]++;
        in_vld = 1'b1;
        do @(posedge clk); while (!in_rdy);
        #1;
        in_vld = 1'b0;
      end
    end
  end

  // ---- results
  initial begin
    int unsigned t0;
    @(posedge rst_n);
    t0 = cyc;
    for (int f = 0; f < NFR; f++) begin
      int nerr;
      do @(posedge clk); while (!done);
      #1;
      nerr = 0;
      for (int v = 0; v < NVAR; v++) if (dec_out[v] != '0) nerr++;
      $display("frame %0d sigma %0.2f: channel symbol errors %0d, decoded errors %0d, iterations %0d, converged %0d, cycle %0d",
               f, sig[f], ch_err[f], nerr, iters, converged, cyc - t0);
      chk(iters >= 1 && iters <= MAXIT, $sformatf("frame %0d: %0d iterations", f, iters));
      if (converged) chk(nerr == 0, $sformatf("frame %0d: converged to a wrong word", f));
      if (converged && iters < MAXIT) n_early++;
      if (!converged) chk(iters == MAXIT, $sformatf("frame %0d: stopped early without converging", f));
      if (!converged) n_maxit++;
      if (converged && ch_err[f] > 0) n_corrected++;
      if (f < 2) chk(converged && iters <= 2, $sformatf("frame %0d: low-noise frame not decoded fast", f));
      if (f == NFR - 1) chk(!converged && iters == MAXIT, "heavy-noise frame should reach the limit");
    end
    $display("longest group: %0d cycles", grp_max);
    chk(grp_max <= 2 * 8 + 5 + 13, $sformatf("group took %0d cycles", grp_max));
    $display("mechanisms: early=%0d maxit=%0d overlap=%0d dup=%0d buf2=%0d bufonly=%0d chins=%0d corrected=%0d",
             n_early, n_maxit, n_overlap, n_dup, n_buf2, n_bufonly, n_chins, n_corrected);
    chk(n_early > 0, "no early termination");
    chk(n_maxit > 0, "no stop at the iteration limit");
    chk(n_overlap > 0, "no frame loaded during decoding");
    chk(n_dup > 0, "no redundant symbol dropped");
    chk(n_buf2 > 0, "never two elements into the buffer");
    chk(n_bufonly > 0, "VNU never fed from the buffer alone");
    chk(n_chins > 0, "no channel symbol inserted by the VNU");
    chk(n_corrected > 0, "no channel error corrected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
