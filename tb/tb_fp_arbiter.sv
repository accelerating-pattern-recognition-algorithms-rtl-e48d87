// tb_fp_arbiter: checks the SRAM arbiter with small banks (4 images of 8
// words) and the behavioural SRAM model (latency 4). The DMA side fills the
// two gallery banks and the probe bank; the fingerprint side then reads
// words back. Checked: address mapping (gallery sample g in bank
// (g / 4) mod 2, probes in bank 2), read data and latency, the ready/release
// handshake of the gallery banks, and each rule that holds DMA writes off
// (ready gallery bank, probe bank while busy, same bank read in that clock,
// unused fourth bank). Held-off writes must not reach the SRAM.
module tb_fp_arbiter;
  import fp_pkg::*;
  localparam int GAL_W = 4, BANK_IMGS = 4, WA = 3, BA = 5, LAT = 4;
  logic clk = 0, rst_n = 0;
  logic fp_busy = 0, rd_req = 0, gal_release = 0, gal_release_bank = 0;
  logic bank_loaded = 0, bank_loaded_id = 0, dma_we = 0;
  img_kind_e rd_kind = K_GALLERY;
  logic [GAL_W-1:0] rd_img = 0;
  logic [WA-1:0] rd_word = 0;
  logic rd_gnt, rd_rvalid, dma_ready;
  logic [SRAM_W-1:0] rd_rdata, dma_wdata = 0;
  logic [1:0] bank_ready, dma_bank = 0;
  logic [BA-1:0] dma_addr = 0;
  logic [NBANKS-1:0] sram_re, sram_we, sram_rvalid;
  logic [BA-1:0] sram_addr [NBANKS];
  logic [SRAM_W-1:0] sram_wdata [NBANKS], sram_rdata [NBANKS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  fp_arbiter #(.GAL_W(GAL_W), .BANK_IMGS(BANK_IMGS), .WA(WA)) dut (.*);
  tb_fp_sram #(.NB(NBANKS), .AW(BA), .LATENCY(LAT)) u_sram (.clk, .re(sram_re), .we(sram_we),
    .addr(sram_addr), .wdata(sram_wdata), .rvalid(sram_rvalid), .rdata(sram_rdata));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [63:0] pat(int bank, int a, int gen);
    return {8'(bank), 8'(gen), 16'(a), 32'hC0DE_0000 + 32'(a)};
  endfunction

  // one DMA write; returns whether it was accepted
  task automatic dma(int bank, int a, int gen, output bit acc);
    @(negedge clk);
    dma_we = 1; dma_bank = 2'(bank); dma_addr = BA'(a); dma_wdata = pat(bank, a, gen);
    #1 acc = dma_ready;
    @(negedge clk) dma_we = 0;
  endtask

  task automatic fill(int bank, int gen);
    bit acc;
    for (int a = 0; a < 32; a++) begin
      dma(bank, a, gen, acc);
      if (!acc) check(0, $sformatf("fill bank %0d word %0d refused", bank, a));
    end
  endtask

  // read one word and check the data and the latency
  task automatic rd(img_kind_e k, int img, int w, logic [63:0] exp, string what);
    int n = 0;
    @(negedge clk);
    rd_req = 1; rd_kind = k; rd_img = GAL_W'(img); rd_word = WA'(w);
    #1 check(rd_gnt, {what, ": not granted"});
    @(negedge clk) rd_req = 0;
    while (!rd_rvalid && n < 20) begin @(negedge clk); n++; end
    check(rd_rvalid && rd_rdata == exp && n == LAT - 1,
          $sformatf("%s: data %h exp %h after %0d clocks", what, rd_rdata, exp, n + 1));
  endtask

  initial begin
    bit acc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    fill(0, 0); fill(1, 0); fill(2, 0);
    check(bank_ready == 2'b00, "banks ready before loaded");
    @(negedge clk) bank_loaded = 1; bank_loaded_id = 0;
    @(negedge clk) bank_loaded_id = 1;
    @(negedge clk) bank_loaded = 0;
    check(bank_ready == 2'b11, "bank_loaded did not set bank_ready");
    // mapping: gallery 1 word 2 -> bank 0 address 1*8+2; gallery 6 -> bank 1 image 2
    rd(K_GALLERY, 1, 2, pat(0, 10, 0), "gallery 1");
    rd(K_GALLERY, 6, 7, pat(1, 23, 0), "gallery 6");
    rd(K_PROBE, 3, 4, pat(2, 28, 0), "probe 3");
    // hold-off rules
    dma(0, 5, 1, acc); check(!acc, "write to a ready gallery bank accepted");
    fp_busy = 1;
    dma(2, 5, 1, acc); check(!acc, "write to the probe bank while busy accepted");
    fp_busy = 0;
    dma(3, 5, 1, acc); check(!acc, "write to bank 3 accepted");
    @(negedge clk);
    rd_req = 1; rd_kind = K_PROBE; rd_img = 0; rd_word = 6;
    dma_we = 1; dma_bank = 2; dma_addr = 7; dma_wdata = pat(2, 7, 1);
    #1 check(!dma_ready && sram_we == 0, "write to a bank read in the same clock accepted");
    @(negedge clk) rd_req = 0; dma_we = 0;
    dma(2, 7, 1, acc); check(acc, "probe bank write refused while idle");
    repeat (LAT + 1) @(negedge clk);
    rd(K_PROBE, 0, 7, pat(2, 7, 1), "probe 0 after rewrite");
    rd(K_GALLERY, 0, 5, pat(0, 5, 0), "gallery 0 unchanged by refused write");
    // release bank 0 and refill it with the next gallery block
    @(negedge clk) gal_release = 1; gal_release_bank = 0;
    @(negedge clk) gal_release = 0;
    check(bank_ready == 2'b10, "release did not clear bank_ready[0]");
    fill(0, 2);
    @(negedge clk) bank_loaded = 1; bank_loaded_id = 0;
    @(negedge clk) bank_loaded = 0;
    rd(K_GALLERY, 9, 1, pat(0, 9, 2), "gallery 9 after refill");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
