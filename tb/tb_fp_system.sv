// tb_fp_system: end-to-end test of the fingerprint correlator at 16 x 16
// pixels with 4-image SRAM banks, 2 probes and 10 gallery samples.
//
// Gallery samples 0-3 go to bank 0 and 4-7 to bank 1 before the run; 8-9 are
// written into bank 0 during the run, after the module has released it, and
// only after a delay so the module has to wait for the bank. Probe 0 is
// gallery sample 2 shifted by (3,5), probe 1 is gallery sample 9 shifted by
// (-2,1). For each probe the reported best gallery sample, peak position and
// squared peak amplitude are compared with a floating-point reference of the
// whole correlation (amplitude within 3%). The testbench also checks that the
// run time fits the two-slot schedule and counts: slots in which phase 1 and
// phase 2 ran at the same time, image loads overlapped with computation, bank
// releases, clocks spent waiting for a bank, and DMA writes held off because
// their bank was in use.
module tb_fp_system;
  import fp_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int N = 16, LN = 4, BANK = 4, PRB_W = 8, GAL_W = 13;
  localparam int NP = 2, NG = 10;
  localparam int WA = $clog2(N * N / 8), BA = $clog2(BANK) + WA;
  localparam int AMP_W = 2 * (W2_IN + LN);

  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done;
  logic bank_loaded = 0, bank_loaded_id = 0;
  logic [1:0] bank_ready;
  logic [PRB_W-1:0] res_addr = '0;
  logic [AMP_W-1:0] res_amp;
  logic [LN-1:0] res_row, res_col;
  logic [GAL_W-1:0] res_gal;
  logic dma_we = 0, dma_ready;
  logic [1:0] dma_bank = '0;
  logic [BA-1:0] dma_addr = '0;
  logic [63:0] dma_wdata = '0;
  logic [NBANKS-1:0] sram_re, sram_we, sram_rvalid;
  logic [BA-1:0] sram_addr [NBANKS];
  logic [63:0] sram_wdata [NBANKS], sram_rdata [NBANKS];
  logic [PRB_W:0] n_probes = NP;
  logic [GAL_W:0] n_gallery = NG;

  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_overlap = 0, n_prefetch = 0, n_release = 0, n_wait = 0, n_holdoff = 0;

  always #5 clk = ~clk;

  fp_system #(.N(N), .PRB_W(PRB_W), .GAL_W(GAL_W), .BANK_IMGS(BANK)) dut (.*);
  tb_fp_sram #(.NB(NBANKS), .AW(BA), .LATENCY(4)) u_sram (
    .clk, .re(sram_re), .we(sram_we), .addr(sram_addr), .wdata(sram_wdata),
    .rvalid(sram_rvalid), .rdata(sram_rdata));

  // mechanism counters (observed on the core's internal status)
  logic ov_prev = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.u_core.p1p_busy && dut.u_core.p2a_busy && !ov_prev) n_overlap++;
    ov_prev <= dut.u_core.p1p_busy && dut.u_core.p2a_busy;
    if (dut.u_core.ld_busy && dut.u_core.p1p_busy && dut.u_core.rd_req) n_prefetch++;
    if (dut.u_core.gal_release) n_release++;
    if (dut.u_core.ld_busy && !dut.u_core.rd_req && dut.u_core.ld_icnt < dut.u_core.ld_total) n_wait++;
    if (dma_we && !dma_ready) n_holdoff++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [63:0] img_word(bit probe, int idx, int w);
    logic [63:0] d;
    for (int q = 0; q < 8; q++)
      d[q*8 +: 8] = probe ? (idx == 0 ? probe_pix(N, 2, 3, 5, 8*w+q) : probe_pix(N, 9, N-2, 1, 8*w+q))
                          : gal_pix(idx, 8*w+q);
    return d;
  endfunction

  task automatic dma_image(int bank, int slot, bit probe, int idx);
    for (int w = 0; w < N * N / 8; w++) begin
      @(negedge clk);
      dma_we = 1; dma_bank = 2'(bank); dma_addr = BA'(slot * (N * N / 8) + w);
      dma_wdata = img_word(probe, idx, w);
      @(posedge clk);
      while (!dma_ready) @(posedge clk);
    end
    @(negedge clk) dma_we = 0;
  endtask

  task automatic mark_loaded(int bank);
    @(negedge clk); bank_loaded = 1; bank_loaded_id = bank[0];
    @(negedge clk); bank_loaded = 0;
  endtask

  initial begin
    real ramp, best_amp;
    int rrow, rcol, best_g, best_r, best_c;
    longint t0, t1, slot_t, bound;
    repeat (3) @(posedge clk);
    rst_n = 1;
    dma_image(2, 0, 1, 0);
    dma_image(2, 1, 1, 1);
    for (int g = 0; g < 8; g++) dma_image(g / 4, g % 4, 0, g);
    mark_loaded(0);
    mark_loaded(1);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t0 = cyc;
    // a DMA write into bank 1 while it is ready must be held off
    @(negedge clk); dma_we = 1; dma_bank = 2'd1; dma_addr = '0; dma_wdata = '1;
    repeat (3) @(posedge clk);
    check(!dma_ready, "DMA write into a ready gallery bank was accepted");
    @(negedge clk) dma_we = 0;
    // refill bank 0 once released, late enough that the core has to wait
    wait (bank_ready[0] == 1'b0);
    repeat (20000) @(posedge clk);
    for (int g = 8; g < NG; g++) dma_image(0, g - 8, 0, g);
    mark_loaded(0);
    wait (done);
    t1 = cyc;
    // results
    for (int p = 0; p < NP; p++) begin
      best_amp = -1; best_g = 0; best_r = 0; best_c = 0;
      for (int g = 0; g < NG; g++) begin
        correlate(N, g, p == 0 ? 2 : 9, p == 0 ? 3 : N - 2, p == 0 ? 5 : 1, ramp, rrow, rcol);
        if (ramp > best_amp) begin best_amp = ramp; best_g = g; best_r = rrow; best_c = rcol; end
      end
      @(negedge clk) res_addr = PRB_W'(p);
      @(negedge clk);
      $display("probe %0d: gallery %0d at (%0d,%0d) amp %0d; reference gallery %0d at (%0d,%0d) amp %0.0f",
               p, res_gal, res_row, res_col, res_amp, best_g, best_r, best_c, best_amp);
      check(int'(res_gal) == best_g, $sformatf("probe %0d best gallery", p));
      check(best_g == (p == 0 ? 2 : 9), $sformatf("reference picks gallery %0d for probe %0d", best_g, p));
      check(int'(res_row) == best_r && int'(res_col) == best_c, $sformatf("probe %0d peak position", p));
      check(real'(res_amp) > 0.97 * best_amp && real'(res_amp) < 1.03 * best_amp,
            $sformatf("probe %0d peak amplitude %0d vs %0.0f", p, res_amp, best_amp));
    end
    // schedule: 2*(pairs+1) slots, each at least one N-line FFT pass
    slot_t = N * (2 * N + N / 2 * LN);
    bound  = (2 * (NP * NG + 1)) * (slot_t + N * 4 + 40) + n_wait + 2 * (N * N / 8) + 100;
    check(t1 - t0 >= (2 * NP * NG + 1) * slot_t && t1 - t0 <= bound,
          $sformatf("run took %0d clocks, expected %0d..%0d", t1 - t0, (2 * NP * NG + 1) * slot_t, bound));
    $display("clocks %0d, overlapped slots %0d, prefetch clocks %0d, releases %0d, wait clocks %0d, DMA hold-offs %0d",
             t1 - t0, n_overlap, n_prefetch, n_release, n_wait, n_holdoff);
    check(n_overlap >= NP * NG - 1, "phase 1 and phase 2 overlapped in too few slots");
    check(n_prefetch > 0, "no image load overlapped computation");
    check(n_release == 3, $sformatf("bank releases %0d, expected 3", n_release));
    check(n_wait > 0, "core never waited for a gallery bank");
    check(n_holdoff > 0, "no DMA write was held off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
