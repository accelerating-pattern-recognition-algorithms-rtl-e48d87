// fp_arbiter: arbiter between the DMA engine and the fingerprint module for
// the off-chip SRAM banks.
//
// Three of the four SRAM banks are used: banks 0 and 1 hold gallery samples,
// bank 2 holds probe images, each bank up to BANK_IMGS images of WORDS 64-bit
// words (image i of its bank at address i*WORDS + word). Gallery sample g lives
// in bank (g / BANK_IMGS) mod 2, so the two gallery banks are used in turn and
// one can be refilled by the DMA engine while the other is processed; this
// hides the transfer time of large galleries.
//
// Gallery-bank handshake: the host marks a gallery bank filled with
// bank_loaded/bank_loaded_id; the bank then shows in bank_ready and the
// fingerprint module may read it. When the module has fetched everything it
// needs from a bank it pulses gal_release, which clears bank_ready and lets the
// DMA engine write that bank again. DMA writes to a ready gallery bank, to the
// probe bank while the fingerprint module is busy, and to any bank the module
// reads in the same clock are held off (dma_ready low); the module's reads are
// never stalled. Read data from the banks return in order after the SRAM
// latency and are merged onto rd_rvalid/rd_rdata.
//
// The bank roles, the 256-image capacity and the alternating use of the two
// gallery banks follow the source design; the ready/release handshake and the
// priority of the fingerprint module over DMA are this design's own choices.
module fp_arbiter
  import fp_pkg::*;
#(
  parameter int GAL_W = 13,
  parameter int BANK_IMGS = 256,
  parameter int WA    = 11,                     // word address within an image
  localparam int BA   = $clog2(BANK_IMGS) + WA  // bank address width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // fingerprint module
  input  logic                  fp_busy,
  input  logic                  rd_req,
  input  img_kind_e             rd_kind,
  input  logic [GAL_W-1:0]      rd_img,
  input  logic [WA-1:0]         rd_word,
  output logic                  rd_gnt,
  output logic                  rd_rvalid,
  output logic [SRAM_W-1:0]     rd_rdata,
  output logic [1:0]            bank_ready,
  input  logic                  gal_release,
  input  logic                  gal_release_bank,
  // host command
  input  logic                  bank_loaded,
  input  logic                  bank_loaded_id,
  // DMA engine write port
  input  logic                  dma_we,
  input  logic [1:0]            dma_bank,
  input  logic [BA-1:0]         dma_addr,
  input  logic [SRAM_W-1:0]     dma_wdata,
  output logic                  dma_ready,
  // SRAM banks 0..2
  output logic [NBANKS-1:0]     sram_re,
  output logic [NBANKS-1:0]     sram_we,
  output logic [BA-1:0]         sram_addr  [NBANKS],
  output logic [SRAM_W-1:0]     sram_wdata [NBANKS],
  input  logic [NBANKS-1:0]     sram_rvalid,
  input  logic [SRAM_W-1:0]     sram_rdata [NBANKS]
);

  localparam int SW = $clog2(BANK_IMGS);

  logic [1:0]    rd_bank;
  logic [BA-1:0] rd_addr;

  assign rd_bank = (rd_kind == K_PROBE) ? 2'(PROBE_BANK) : {1'b0, rd_img[SW]};
  assign rd_addr = {rd_img[SW-1:0], rd_word};
  assign rd_gnt  = rd_req;

  // DMA admission
  always_comb begin
    dma_ready = 1'b1;
    if (rd_req && rd_bank == dma_bank) dma_ready = 1'b0;
    if (dma_bank == 2'(PROBE_BANK) && fp_busy) dma_ready = 1'b0;
    if (dma_bank != 2'(PROBE_BANK) && bank_ready[dma_bank[0]]) dma_ready = 1'b0;
    if (dma_bank == 2'd3) dma_ready = 1'b0;      // fourth bank unused
  end

  always_comb begin
    for (int b = 0; b < NBANKS; b++) begin
      sram_re[b]    = rd_req && rd_bank == 2'(b);
      sram_we[b]    = dma_we && dma_ready && dma_bank == 2'(b);
      sram_addr[b]  = sram_re[b] ? rd_addr : dma_addr;
      sram_wdata[b] = dma_wdata;
    end
    rd_rvalid = |sram_rvalid;
    rd_rdata  = '0;
    for (int b = 0; b < NBANKS; b++)
      if (sram_rvalid[b]) rd_rdata = sram_rdata[b];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bank_ready <= '0;
    else begin
      if (gal_release) bank_ready[gal_release_bank] <= 1'b0;
      if (bank_loaded) bank_ready[bank_loaded_id] <= 1'b1;
    end
  end

  a_read_ready_bank: assert property (@(posedge clk) disable iff (!rst_n)
      rd_req && rd_kind == K_GALLERY |-> bank_ready[rd_img[SW]]);
  a_one_rvalid: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sram_rvalid));

endmodule
