// tb_pr_accel_top: end-to-end test of the accelerator top level with both designs
// running side by side. Reduced size: 16 x 16 fingerprint images, 4-image
// SRAM banks, 2 probes and 10 gallery samples (the last two written into a
// released bank during the run); the SNN at the size of network one (576
// level-1 neurons on 6 PEs).
//
// Fingerprint correlator: probe images and gallery samples are written into
// the SRAM banks through the DMA port, the run is started, and the best match
// reported for each probe (gallery index, peak position, squared peak
// amplitude within 3 %) is compared with a floating-point correlation.
// Spiking network: while the correlator runs, a character image is loaded and
// recognised (class, cycle count and recognised flag against an integer model
// of the network), then a blank image is presented, which must run into the
// 12-cycle limit without a recognition.
//
// Each mechanism is counted and the test fails if one never happened:
// phase 1 and phase 2 running in the same slot, image loads overlapped with
// computation, gallery bank release, waiting for a gallery bank, DMA writes held
// off, SNN weight streaming from the SRAM, an SNN recognition and an SNN
// time-out at the cycle limit.
module tb_pr_accel_top;
  import fp_pkg::*;
  import tb_fp_ref_pkg::*;
  import tb_snn_ref_pkg::*;

  // sizes
  localparam int N = 16, BANK = 4, PRB_W = 8, GAL_W = 13, NP = 2, NG = 10;
  localparam int PG [2] = '{2, 9}, PR [2] = '{3, 14}, PC [2] = '{5, 1};
  localparam int N1 = 576, N2 = 48, N_PE = 6, SNN_CHAR = 5;
  localparam int REFILL_DELAY = 20000, WATCHDOG = 400000;
  localparam int LN = $clog2(N), WORDS = N * N / 8, WA = $clog2(WORDS);
  localparam int BA = $clog2(BANK) + WA, AMP_W = 2 * (W2_IN + LN);
  localparam int ALPHA = 589824 / N1, SAW = 20, MAXC = 12;

  logic clk = 0, rst_n = 0;
  // fingerprint side
  logic fp_start = 0, fp_busy, fp_done;
  logic [PRB_W:0] fp_n_probes = NP;
  logic [GAL_W:0] fp_n_gallery = NG;
  logic fp_bank_loaded = 0, fp_bank_loaded_id = 0;
  logic [1:0] fp_bank_ready;
  logic [PRB_W-1:0] fp_res_addr = '0;
  logic [AMP_W-1:0] fp_res_amp;
  logic [LN-1:0] fp_res_row, fp_res_col;
  logic [GAL_W-1:0] fp_res_gal;
  logic fp_dma_we = 0, fp_dma_ready;
  logic [1:0] fp_dma_bank = '0;
  logic [BA-1:0] fp_dma_addr = '0;
  logic [63:0] fp_dma_wdata = '0;
  logic [NBANKS-1:0] fp_sram_re, fp_sram_we, fp_sram_rvalid;
  logic [BA-1:0] fp_sram_addr [NBANKS];
  logic [63:0] fp_sram_wdata [NBANKS], fp_sram_rdata [NBANKS];
  // SNN side
  logic snn_img_we = 0, snn_img_pixel = 0, snn_start = 0;
  logic [$clog2(N1)-1:0] snn_img_addr = '0;
  logic snn_finished, snn_recognized;
  logic [$clog2(N2)-1:0] snn_class_idx;
  logic [7:0] snn_cycle_count;
  logic snn_sram_req, snn_sram_rvalid;
  logic [SAW-1:0] snn_sram_addr;
  logic [63:0] snn_sram_rdata;
  int n_req;

  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_overlap = 0, n_prefetch = 0, n_release = 0, n_wait = 0, n_holdoff = 0;
  int n_recog = 0, n_timeout = 0, n_fp_snn_parallel = 0;
  bit fp_ok_done = 0;

  always #5 clk = ~clk;

  pr_accel_top #(.FP_N(N), .FP_PRB_W(PRB_W), .FP_GAL_W(GAL_W), .FP_BANK_IMGS(BANK),
                 .SNN_N1(N1), .SNN_N2(N2), .SNN_N_PE(N_PE), .SNN_MAX_CYC(MAXC),
                 .SNN_SRAM_AW(SAW)) dut (.*);
  tb_fp_sram #(.NB(NBANKS), .AW(BA), .LATENCY(4)) u_fp_sram (
    .clk, .re(fp_sram_re), .we(fp_sram_we), .addr(fp_sram_addr), .wdata(fp_sram_wdata),
    .rvalid(fp_sram_rvalid), .rdata(fp_sram_rdata));
  tb_weight_sram #(.LATENCY(11), .AW(SAW), .N2(N2), .ALPHA(ALPHA)) u_snn_sram (
    .clk, .req(snn_sram_req), .addr(snn_sram_addr), .rvalid(snn_sram_rvalid),
    .rdata(snn_sram_rdata), .n_req);

  // mechanism counters
  logic ov_prev = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.u_fp.u_core.p1p_busy && dut.u_fp.u_core.p2a_busy && !ov_prev) n_overlap++;
    ov_prev <= dut.u_fp.u_core.p1p_busy && dut.u_fp.u_core.p2a_busy;
    if (dut.u_fp.u_core.ld_busy && dut.u_fp.u_core.p1p_busy && dut.u_fp.u_core.rd_req) n_prefetch++;
    if (dut.u_fp.u_core.gal_release) n_release++;
    if (dut.u_fp.u_core.ld_busy && !dut.u_fp.u_core.rd_req &&
        dut.u_fp.u_core.ld_icnt < dut.u_fp.u_core.ld_total) n_wait++;
    if (fp_dma_we && !fp_dma_ready) n_holdoff++;
    if (fp_busy && snn_sram_req) n_fp_snn_parallel++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // probe p is gallery sample PG[p] shifted by (PR[p], PC[p])
  function automatic logic [63:0] img_word(bit probe, int idx, int w);
    logic [63:0] d;
    for (int q = 0; q < 8; q++)
      d[q*8 +: 8] = probe ? probe_pix(N, PG[idx], PR[idx], PC[idx], 8*w+q) : gal_pix(idx, 8*w+q);
    return d;
  endfunction

  task automatic dma_image(int bank, int slot, bit probe, int idx);
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      fp_dma_we = 1; fp_dma_bank = 2'(bank); fp_dma_addr = BA'(slot * WORDS + w);
      fp_dma_wdata = img_word(probe, idx, w);
      @(posedge clk);
      while (!fp_dma_ready) @(posedge clk);
    end
    @(negedge clk) fp_dma_we = 0;
  endtask

  task automatic mark_loaded(int bank);
    @(negedge clk); fp_bank_loaded = 1; fp_bank_loaded_id = bank[0];
    @(negedge clk); fp_bank_loaded = 0;
  endtask

  // ---------------------------------------------------------------- SNN model
  task automatic ref_run(int k, bit blank, output int cls, output bit rec, output int ncyc, output int nspk);
    longint v1[N1], u1[N1], v2[N2], u2[N2], i2[N2];
    bit f1[N1], f;
    cls = 0; rec = 0; ncyc = 0; nspk = 0;
    for (int i = 0; i < N1; i++) begin v1[i] = -65*4096; u1[i] = (819 * v1[i]) >>> 12; end
    for (int j = 0; j < N2; j++) begin v2[j] = -65*4096; u2[j] = (901 * v2[j]) >>> 12; i2[j] = 0; end
    for (int c = 0; c < MAXC; c++) begin
      for (int i = 0; i < N1; i++) izh_step(v1[i], u1[i], (!blank && tmpl(k, i)) ? 20*4096 : 0, R_EXC, f1[i]);
      for (int j = 0; j < N2; j++) begin
        izh_step(v2[j], u2[j], i2[j], R_INH, f);
        if (f && !rec) begin rec = 1; cls = j; end
      end
      if (rec) begin ncyc = c; return; end
      for (int j = 0; j < N2; j++) begin
        i2[j] = 0;
        for (int i = 0; i < N1; i++) if (f1[i]) i2[j] += weight(i, j, ALPHA);
      end
      for (int i = 0; i < N1; i++) nspk += int'(f1[i]);
    end
    ncyc = MAXC;
  endtask

  task automatic snn_case(int k, bit blank);
    int cls, ncyc, nspk, req0;
    bit rec;
    longint t0;
    ref_run(k, blank, cls, rec, ncyc, nspk);
    for (int i = 0; i < N1; i++) begin
      @(negedge clk);
      snn_img_we = 1; snn_img_addr = i[$clog2(N1)-1:0]; snn_img_pixel = !blank && tmpl(k, i);
    end
    @(negedge clk) snn_img_we = 0;
    req0 = n_req;
    snn_start = 1;
    @(negedge clk) snn_start = 0;
    t0 = cyc;
    wait (snn_finished);
    @(negedge clk);
    $display("SNN %s %0d: recognised %0b class %0d cycle %0d, %0d clocks (model: %0b %0d %0d)",
             blank ? "blank" : "char", k, snn_recognized, snn_class_idx, snn_cycle_count,
             cyc - t0, rec, cls, ncyc);
    check(snn_recognized == rec && (!rec || int'(snn_class_idx) == cls) && int'(snn_cycle_count) == ncyc,
          $sformatf("SNN %0d result differs from the model", k));
    check(n_req - req0 == nspk * (N2 / 4), $sformatf("SNN %0d weight reads %0d exp %0d", k, n_req - req0, nspk * (N2 / 4)));
    if (!blank) check(rec && cls == k, $sformatf("model does not recognise character %0d", k));
    if (snn_recognized) n_recog++;
    if (!snn_recognized && snn_cycle_count == MAXC) n_timeout++;
  endtask

  // ---------------------------------------------------------------- stimulus
  initial begin
    real ramp, best_amp;
    int rrow, rcol, best_g, best_r, best_c;
    repeat (30) @(posedge clk);   // long enough to flush the unreset pipelines
    rst_n = 1;
    for (int p = 0; p < NP; p++) dma_image(2, p, 1, p);
    for (int g = 0; g < NG && g < 2 * BANK; g++) dma_image((g / BANK) % 2, g % BANK, 0, g);
    if (NG > BANK) mark_loaded(1);
    @(negedge clk) fp_start = 1;
    @(negedge clk) fp_start = 0;
    // a DMA write into the probe bank while the correlator runs is held off
    @(negedge clk); fp_dma_we = 1; fp_dma_bank = 2'd2; fp_dma_addr = '0; fp_dma_wdata = '1;
    repeat (3) @(posedge clk);
    check(!fp_dma_ready, "DMA write into the probe bank accepted during a run");
    @(negedge clk) fp_dma_we = 0;
    // bank 0 is marked loaded late, so the core has to wait for it
    repeat (3000) @(posedge clk);
    mark_loaded(0);
    if (NG > 2 * BANK) begin
      // refill bank 0 with the remaining gallery samples once it is released
      wait (fp_bank_ready[0] == 1'b0);
      repeat (REFILL_DELAY) @(posedge clk);
      for (int g = 2 * BANK; g < NG; g++) dma_image(0, g - 2 * BANK, 0, g);
      mark_loaded(0);
    end
    wait (fp_done);
    for (int p = 0; p < NP; p++) begin
      best_amp = -1; best_g = 0; best_r = 0; best_c = 0;
      for (int g = 0; g < NG; g++) begin
        if (NG > 3 && g != PG[p] && g != (PG[p] + 1) % NG) continue;   // keep the reference short
        correlate(N, g, PG[p], PR[p], PC[p], ramp, rrow, rcol);
        if (ramp > best_amp) begin best_amp = ramp; best_g = g; best_r = rrow; best_c = rcol; end
      end
      @(negedge clk) fp_res_addr = PRB_W'(p);
      @(negedge clk);
      $display("FP probe %0d: gallery %0d at (%0d,%0d) amp %0d; reference gallery %0d at (%0d,%0d) amp %0.0f",
               p, fp_res_gal, fp_res_row, fp_res_col, fp_res_amp, best_g, best_r, best_c, best_amp);
      check(int'(fp_res_gal) == PG[p] && best_g == PG[p], $sformatf("probe %0d best gallery", p));
      check(int'(fp_res_row) == best_r && int'(fp_res_col) == best_c, $sformatf("probe %0d peak position", p));
      check(real'(fp_res_amp) > 0.97 * best_amp && real'(fp_res_amp) < 1.03 * best_amp,
            $sformatf("probe %0d peak amplitude", p));
    end
    fp_ok_done = 1;
  end

  initial begin
    wait (rst_n);
    repeat (100) @(posedge clk);
    // arguments are drawn at run time so the network model is not folded at compile time
    snn_case(SNN_CHAR + int'($urandom_range(0, 0)), 1'b0);
    snn_case(int'($urandom_range(0, 0)), 1'(1 + $urandom_range(0, 0)));
    wait (fp_ok_done);
    $display("mechanisms: overlap %0d, prefetch %0d, releases %0d, bank wait %0d, DMA hold-off %0d, SNN weight reads during FP run %0d, recognitions %0d, time-outs %0d",
             n_overlap, n_prefetch, n_release, n_wait, n_holdoff, n_fp_snn_parallel, n_recog, n_timeout);
    check(n_overlap > 0, "phase 1 and phase 2 never overlapped");
    check(n_prefetch > 0, "no image load overlapped computation");
    check(n_release > 0, "no gallery bank was released");
    check(n_wait > 0, "the core never waited for a gallery bank");
    check(n_holdoff > 0, "no DMA write was held off");
    check(n_req > 0, "no SNN weight was read");
    check(n_recog > 0, "no SNN recognition");
    check(n_timeout > 0, "no SNN time-out at the cycle limit");
    check(n_fp_snn_parallel > 0, "the two designs never ran at the same time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
