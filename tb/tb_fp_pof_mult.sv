// tb_fp_pof_mult: checks the phase-only-filter product P = F * conj(G)/|G|
// (scaled by 2^12) for random and corner-case spectra against a real-valued
// reference, with a tolerance of 0.05 % of |F| plus two output LSBs. It also
// checks that every result appears exactly ITER + 2 = 18 clocks after its
// input and that one bin per clock is accepted (back-to-back inputs).
module tb_fp_pof_mult;
  localparam int IW = 23, OW = 36, LAT = 18, NV = 400;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [IW-1:0] f_re, f_im, g_re, g_im;
  logic busy, out_valid;
  logic signed [OW-1:0] p_re, p_im;
  int checks = 0, failures = 0;
  real exp_re [NV], exp_im [NV], tol [NV];
  int  t_in [NV];
  int  nin = 0, nout = 0, cyc = 0;

  always #5 clk = ~clk;
  fp_pof_mult #(.IW(IW), .OW(OW), .ITER(16)) dut (.*);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid && rst_n) begin
      real dr, di;
      checks++;
      dr = $itor(p_re) - exp_re[nout];
      di = $itor(p_im) - exp_im[nout];
      if (dr > tol[nout] || dr < -tol[nout] || di > tol[nout] || di < -tol[nout] ||
          cyc - t_in[nout] != LAT) begin
        failures++;
        if (failures < 10)
          $display("FAIL bin %0d: got (%0d,%0d) exp (%f,%f) latency %0d", nout, p_re, p_im,
                   exp_re[nout], exp_im[nout], cyc - t_in[nout]);
      end
      nout++;
    end
  end

  function automatic int rnd(int range);
    return $signed($urandom_range(2 * range)) - range;
  endfunction

  initial begin
    int lim;
    repeat (30) @(posedge clk);   // long enough to flush the unreset pipelines
    rst_n = 1;
    for (int k = 0; k < NV; k++) begin
      real fr, fi, gr, gi, m;
      lim = (k % 3 == 0) ? 4000000 : (k % 3 == 1) ? 3000 : 40;
      fr = rnd(lim); fi = rnd(lim); gr = rnd(lim); gi = rnd(lim);
      if (k == 0) begin gr = 5; gi = 0; end          // G on the positive real axis
      if (k == 1) begin gr = -7; gi = 0; end         // negative real axis
      if (k == 2) begin gr = 0; gi = 9; end          // imaginary axis
      if (k == 3) begin gr = -4194304; gi = -4194304; fr = 4194303; fi = -4194304; end
      if (gr == 0 && gi == 0) gr = 1;
      m = $sqrt(gr * gr + gi * gi);
      exp_re[k] = 4096.0 * (fr * gr + fi * gi) / m;
      exp_im[k] = 4096.0 * (fi * gr - fr * gi) / m;
      tol[k] = 4096.0 * $sqrt(fr * fr + fi * fi) * 0.0005 + 2.0;
      @(negedge clk);
      in_valid = 1;
      f_re = IW'($rtoi(fr)); f_im = IW'($rtoi(fi));
      g_re = IW'($rtoi(gr)); g_im = IW'($rtoi(gi));
      t_in[k] = cyc;
      if (k % 50 == 49) begin                      // a gap now and then
        @(negedge clk) in_valid = 0;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (nout != NV || busy) begin
      failures++;
      $display("FAIL: %0d outputs of %0d, busy=%0b", nout, NV, busy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
