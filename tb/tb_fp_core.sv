// tb_fp_core: checks the fingerprint module on its own at 16 x 16 pixels,
// 2 probes and 3 gallery samples. The testbench answers the core's read
// requests itself (images generated on the fly, 3 clocks of read latency,
// and the grant withheld on about one clock in four), with both gallery banks
// always ready. Probe 0 is gallery sample 1 shifted by (2,7), probe 1 is gallery
// sample 2 shifted by (5,-3). For each probe the best gallery sample, the peak
// position and the squared peak amplitude (within 3 %) are compared with a
// floating-point correlation. Also checked: each image is fetched the expected
// number of times (gallery once, probe once per gallery sample), and the run
// length fits the two-slot schedule: 2*(pairs)+1 slots of at least one full
// 16-line FFT pass each.
module tb_fp_core;
  import fp_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int N = 16, LN = 4, PRB_W = 4, GAL_W = 5;
  localparam int NP = 2, NG = 3, WORDS = N * N / 8, WA = $clog2(WORDS);
  localparam int AMP_W = 2 * (W2_IN + LN), RLAT = 3;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [PRB_W:0] n_probes = NP;
  logic [GAL_W:0] n_gallery = NG;
  logic [PRB_W-1:0] res_addr = 0;
  logic [AMP_W-1:0] res_amp;
  logic [LN-1:0] res_row, res_col;
  logic [GAL_W-1:0] res_gal;
  logic rd_req, rd_gnt, rd_rvalid;
  img_kind_e rd_kind;
  logic [GAL_W-1:0] rd_img;
  logic [WA-1:0] rd_word;
  logic [SRAM_W-1:0] rd_rdata;
  logic [1:0] bank_ready = 2'b11;
  logic gal_release, gal_release_bank;
  int checks = 0, failures = 0;
  longint cyc = 0;
  int words_p [NP], words_g [NG];
  logic          pv [RLAT];
  logic [63:0]   pd [RLAT];

  always #5 clk = ~clk;
  fp_core #(.N(N), .PRB_W(PRB_W), .GAL_W(GAL_W), .BANK_IMGS(4)) dut (.*);

  function automatic logic [63:0] img_word(bit probe, int idx, int w);
    logic [63:0] d;
    for (int q = 0; q < 8; q++)
      d[q*8 +: 8] = probe ? (idx == 0 ? probe_pix(N, 1, 2, 7, 8*w+q) : probe_pix(N, 2, 5, N-3, 8*w+q))
                          : gal_pix(idx, 8*w+q);
    return d;
  endfunction

  // memory responder
  always @(negedge clk) rd_gnt = ($urandom_range(3) != 0);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    pv[0] <= rd_req && rd_gnt;
    pd[0] <= img_word(rd_kind == K_PROBE, int'(rd_img), int'(rd_word));
    for (int k = 1; k < RLAT; k++) begin pv[k] <= pv[k-1]; pd[k] <= pd[k-1]; end
    if (rd_req && rd_gnt) begin
      if (rd_kind == K_PROBE) words_p[rd_img]++;
      else words_g[rd_img]++;
    end
  end
  assign rd_rvalid = pv[RLAT-1];
  assign rd_rdata  = pd[RLAT-1];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real ramp, best_amp;
    int rrow, rcol, best_g, best_r, best_c;
    longint t0, t1, slot_t;
    for (int k = 0; k < RLAT; k++) pv[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t0 = cyc;
    check(busy, "not busy after start");
    wait (done);
    t1 = cyc;
    for (int p = 0; p < NP; p++) begin
      best_amp = -1; best_g = 0; best_r = 0; best_c = 0;
      for (int g = 0; g < NG; g++) begin
        correlate(N, g, p == 0 ? 1 : 2, p == 0 ? 2 : 5, p == 0 ? 7 : N - 3, ramp, rrow, rcol);
        if (ramp > best_amp) begin best_amp = ramp; best_g = g; best_r = rrow; best_c = rcol; end
      end
      @(negedge clk) res_addr = PRB_W'(p);
      @(negedge clk);
      $display("probe %0d: gallery %0d at (%0d,%0d) amp %0d; reference gallery %0d at (%0d,%0d) amp %0.0f",
               p, res_gal, res_row, res_col, res_amp, best_g, best_r, best_c, best_amp);
      check(int'(res_gal) == best_g && best_g == p + 1, $sformatf("probe %0d best gallery", p));
      check(int'(res_row) == best_r && int'(res_col) == best_c, $sformatf("probe %0d peak position", p));
      check(real'(res_amp) > 0.97 * best_amp && real'(res_amp) < 1.03 * best_amp,
            $sformatf("probe %0d peak amplitude %0d vs %0.0f", p, res_amp, best_amp));
    end
    for (int p = 0; p < NP; p++)
      check(words_p[p] == NG * WORDS, $sformatf("probe %0d fetched %0d words", p, words_p[p]));
    for (int g = 0; g < NG; g++)
      check(words_g[g] == WORDS, $sformatf("gallery %0d fetched %0d words", g, words_g[g]));
    slot_t = N * (2 * N + N / 2 * LN);
    check(t1 - t0 >= (2 * NP * NG + 1) * slot_t && t1 - t0 <= (2 * NP * NG + 2) * (slot_t + 4 * N + 60) + 4 * WORDS,
          $sformatf("run took %0d clocks, slot %0d", t1 - t0, slot_t));
    check(!busy, "busy after done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
