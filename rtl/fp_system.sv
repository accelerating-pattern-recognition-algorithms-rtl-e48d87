// fp_system: FPGA side of the phase-only-filter fingerprint accelerator.
//
// Connects the fingerprint module (fp_core) to the SRAM arbiter
// (fp_arbiter). The host writes probe images into SRAM bank 2 and gallery
// samples into banks 0 and 1 through the DMA port, marks gallery banks filled
// with bank_loaded, sets n_probes and n_gallery and pulses start. While a run
// is in progress the host may refill a gallery bank once bank_ready shows it
// released. done pulses at the end; the best match of each probe is then read
// with res_addr (data one clock later).
//
// The vendor-supplied DMA engine and host interface logic are outside this
// module: their signals are its ports. The three SRAM banks are external too.
module fp_system
  import fp_pkg::*;
#(
  parameter int N     = 128,
  parameter int PRB_W = 8,
  parameter int GAL_W = 13,
  parameter int BANK_IMGS = 256,
  localparam int LN    = $clog2(N),
  localparam int WA    = $clog2(N * N / PIX_PER_W),
  localparam int BA    = $clog2(BANK_IMGS) + WA,
  localparam int AMP_W = 2 * (W2_IN + LN)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host command / status
  input  logic                  start,
  input  logic [PRB_W:0]        n_probes,
  input  logic [GAL_W:0]        n_gallery,
  output logic                  busy,
  output logic                  done,
  input  logic                  bank_loaded,
  input  logic                  bank_loaded_id,
  output logic [1:0]            bank_ready,
  input  logic [PRB_W-1:0]      res_addr,
  output logic [AMP_W-1:0]      res_amp,
  output logic [LN-1:0]         res_row,
  output logic [LN-1:0]         res_col,
  output logic [GAL_W-1:0]      res_gal,
  // DMA engine
  input  logic                  dma_we,
  input  logic [1:0]            dma_bank,
  input  logic [BA-1:0]         dma_addr,
  input  logic [SRAM_W-1:0]     dma_wdata,
  output logic                  dma_ready,
  // SRAM banks
  output logic [NBANKS-1:0]     sram_re,
  output logic [NBANKS-1:0]     sram_we,
  output logic [BA-1:0]         sram_addr  [NBANKS],
  output logic [SRAM_W-1:0]     sram_wdata [NBANKS],
  input  logic [NBANKS-1:0]     sram_rvalid,
  input  logic [SRAM_W-1:0]     sram_rdata [NBANKS]
);

  logic              rd_req, rd_gnt, rd_rvalid;
  img_kind_e         rd_kind;
  logic [GAL_W-1:0]  rd_img;
  logic [WA-1:0]     rd_word;
  logic [SRAM_W-1:0] rd_rdata;
  logic              gal_release, gal_release_bank;

  fp_core #(.N(N), .PRB_W(PRB_W), .GAL_W(GAL_W), .BANK_IMGS(BANK_IMGS)) u_core (
    .clk, .rst_n, .start, .n_probes, .n_gallery, .busy, .done,
    .res_addr, .res_amp, .res_row, .res_col, .res_gal,
    .rd_req, .rd_kind, .rd_img, .rd_word, .rd_gnt, .rd_rvalid, .rd_rdata,
    .bank_ready, .gal_release, .gal_release_bank);

  fp_arbiter #(.GAL_W(GAL_W), .BANK_IMGS(BANK_IMGS), .WA(WA)) u_arb (
    .clk, .rst_n, .fp_busy(busy),
    .rd_req, .rd_kind, .rd_img, .rd_word, .rd_gnt, .rd_rvalid, .rd_rdata,
    .bank_ready, .gal_release, .gal_release_bank,
    .bank_loaded, .bank_loaded_id,
    .dma_we, .dma_bank, .dma_addr, .dma_wdata, .dma_ready,
    .sram_re, .sram_we, .sram_addr, .sram_wdata, .sram_rvalid, .sram_rdata);

endmodule
