// fp_pkg: sizes shared by the blocks of the phase-only-filter fingerprint
// correlator.
//
// Images are N x N unsigned 8-bit pixels (128 x 128 in the source design).
// The off-chip SRAM word is 64 bits, i.e. eight pixels; each SRAM bank holds
// up to 256 images (the BANK_IMGS parameter of the modules). The two gallery banks alternate; the
// third bank holds the probe images. FFT widths: the first transform's units
// take 16-bit samples (8-bit pixels in the row pass), the second transform's
// units take the 24 most significant bits of their inputs, as in the source
// design; the widths in between follow from unscaled FFT growth.
package fp_pkg;
  localparam int SRAM_W    = 64;
  localparam int PIX_PER_W = SRAM_W / 8;
  localparam int NBANKS    = 3;       // banks used: 0,1 gallery, 2 probes
  localparam int PROBE_BANK = 2;
  localparam int W1_IN     = 16;      // first-transform FFT input width
  localparam int W2_IN     = 24;      // second-transform FFT input width
  localparam int MB1_W     = 36;      // filtered spectrum component width

  typedef enum logic {K_PROBE = 1'b0, K_GALLERY = 1'b1} img_kind_e;
endpackage
