// pr_accel_top: the two FPGA pattern-recognition accelerators side by side.
//
// Two independent designs share only the clock and reset:
//  - fp_system: phase-only-filter fingerprint correlator. Every probe image is
//    correlated with every gallery sample through two-dimensional FFTs and a
//    phase-only filter, and the best-matching gallery sample per probe is
//    reported. Its host, DMA and SRAM-bank signals are ports (prefix fp_).
//  - snn_module: Izhikevich spiking-neural-network character recogniser. A
//    binary image drives one level-1 neuron per pixel; the first level-2
//    neuron to fire names the character. Its host and weight-SRAM signals are
//    ports (prefix snn_).
// The host processor, the vendor DMA engine and interface logic and the
// off-chip SRAMs are not part of the design; their signals are the ports.
// Defaults are the main configurations: 128 x 128 images with 256-image
// banks for the correlator, the 96 x 96-pixel, 25-PE network for the
// recogniser.
module pr_accel_top
  import fp_pkg::*;
  import snn_pkg::*;
#(
  parameter int FP_N         = 128,
  parameter int FP_PRB_W     = 8,
  parameter int FP_GAL_W     = 13,
  parameter int FP_BANK_IMGS = 256,
  parameter int SNN_N1       = 9216,
  parameter int SNN_N2       = 48,
  parameter int SNN_N_PE     = 25,
  parameter int SNN_MAX_CYC  = 12,
  parameter int SNN_SRAM_AW  = 20,
  localparam int FP_LN    = $clog2(FP_N),
  localparam int FP_WA    = $clog2(FP_N * FP_N / PIX_PER_W),
  localparam int FP_BA    = $clog2(FP_BANK_IMGS) + FP_WA,
  localparam int FP_AMP_W = 2 * (W2_IN + FP_LN)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // ---------------- fingerprint correlator
  input  logic                       fp_start,
  input  logic [FP_PRB_W:0]          fp_n_probes,
  input  logic [FP_GAL_W:0]          fp_n_gallery,
  output logic                       fp_busy,
  output logic                       fp_done,
  input  logic                       fp_bank_loaded,
  input  logic                       fp_bank_loaded_id,
  output logic [1:0]                 fp_bank_ready,
  input  logic [FP_PRB_W-1:0]        fp_res_addr,
  output logic [FP_AMP_W-1:0]        fp_res_amp,
  output logic [FP_LN-1:0]           fp_res_row,
  output logic [FP_LN-1:0]           fp_res_col,
  output logic [FP_GAL_W-1:0]        fp_res_gal,
  input  logic                       fp_dma_we,
  input  logic [1:0]                 fp_dma_bank,
  input  logic [FP_BA-1:0]           fp_dma_addr,
  input  logic [fp_pkg::SRAM_W-1:0]  fp_dma_wdata,
  output logic                       fp_dma_ready,
  output logic [NBANKS-1:0]          fp_sram_re,
  output logic [NBANKS-1:0]          fp_sram_we,
  output logic [FP_BA-1:0]           fp_sram_addr  [NBANKS],
  output logic [fp_pkg::SRAM_W-1:0]  fp_sram_wdata [NBANKS],
  input  logic [NBANKS-1:0]          fp_sram_rvalid,
  input  logic [fp_pkg::SRAM_W-1:0]  fp_sram_rdata [NBANKS],
  // ---------------- spiking neural network recogniser
  input  logic                       snn_img_we,
  input  logic [$clog2(SNN_N1)-1:0]  snn_img_addr,
  input  logic                       snn_img_pixel,
  input  logic                       snn_start,
  output logic                       snn_finished,
  output logic                       snn_recognized,
  output logic [$clog2(SNN_N2)-1:0]  snn_class_idx,
  output logic [7:0]                 snn_cycle_count,
  output logic                       snn_sram_req,
  output logic [SNN_SRAM_AW-1:0]     snn_sram_addr,
  input  logic                       snn_sram_rvalid,
  input  logic [snn_pkg::SRAM_W-1:0] snn_sram_rdata
);

  fp_system #(.N(FP_N), .PRB_W(FP_PRB_W), .GAL_W(FP_GAL_W), .BANK_IMGS(FP_BANK_IMGS)) u_fp (
    .clk, .rst_n,
    .start(fp_start), .n_probes(fp_n_probes), .n_gallery(fp_n_gallery),
    .busy(fp_busy), .done(fp_done),
    .bank_loaded(fp_bank_loaded), .bank_loaded_id(fp_bank_loaded_id), .bank_ready(fp_bank_ready),
    .res_addr(fp_res_addr), .res_amp(fp_res_amp), .res_row(fp_res_row), .res_col(fp_res_col),
    .res_gal(fp_res_gal),
    .dma_we(fp_dma_we), .dma_bank(fp_dma_bank), .dma_addr(fp_dma_addr), .dma_wdata(fp_dma_wdata),
    .dma_ready(fp_dma_ready),
    .sram_re(fp_sram_re), .sram_we(fp_sram_we), .sram_addr(fp_sram_addr),
    .sram_wdata(fp_sram_wdata), .sram_rvalid(fp_sram_rvalid), .sram_rdata(fp_sram_rdata));

  snn_module #(.N1(SNN_N1), .N2(SNN_N2), .N_PE(SNN_N_PE), .MAX_CYCLES(SNN_MAX_CYC),
               .SRAM_AW(SNN_SRAM_AW)) u_snn (
    .clk, .rst_n,
    .img_we(snn_img_we), .img_addr(snn_img_addr), .img_pixel(snn_img_pixel), .start(snn_start),
    .finished(snn_finished), .recognized(snn_recognized), .class_idx(snn_class_idx),
    .cycle_count(snn_cycle_count),
    .sram_req(snn_sram_req), .sram_addr(snn_sram_addr), .sram_rvalid(snn_sram_rvalid),
    .sram_rdata(snn_sram_rdata));

endmodule
