// fp_peak: correlation peak detector of the fingerprint correlator.
//
// While the last FFT pass streams out one correlation plane, the detector
// forms the magnitude of each output and keeps the largest value with its
// coordinates. At the end of the plane it compares that peak with the best
// match stored for the current probe image and, if larger (or if this is the
// first gallery sample), stores peak amplitude, coordinates and gallery
// index. The table is read by the host through res_addr once all gallery
// samples are processed.
//
// The running peak search, the stored fields and their return to the host
// follow the source design. The magnitude used is re^2 + im^2, which orders
// outputs like the absolute value without a square root; that, the per-probe
// table and the tie rule (the earlier position or gallery sample wins) are this
// design's own choices.
//
// Timing: one sample per clock with in_valid; frame_start must precede the
// first sample of a plane and frame_end follow its last sample by at least one
// clock. Table reads return data one clock after res_addr.
module fp_peak #(
  parameter int W     = 31,
  parameter int N     = 128,
  parameter int GAL_W = 13,
  parameter int PRB_W = 8,
  localparam int AMP_W = 2 * W,
  localparam int CO_W  = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 frame_start,
  input  logic                 frame_end,
  input  logic [PRB_W-1:0]     probe_idx,
  input  logic [GAL_W-1:0]     gal_idx,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_re,
  input  logic signed [W-1:0]  in_im,
  input  logic [CO_W-1:0]      in_row,
  input  logic [CO_W-1:0]      in_col,
  // last plane's peak
  output logic                 peak_valid,
  output logic [AMP_W-1:0]     peak_amp,
  output logic [CO_W-1:0]      peak_row,
  output logic [CO_W-1:0]      peak_col,
  // best match per probe
  input  logic [PRB_W-1:0]     res_addr,
  output logic [AMP_W-1:0]     res_amp,
  output logic [CO_W-1:0]      res_row,
  output logic [CO_W-1:0]      res_col,
  output logic [GAL_W-1:0]     res_gal
);

  typedef struct packed {
    logic [AMP_W-1:0] amp;
    logic [CO_W-1:0]  row;
    logic [CO_W-1:0]  col;
    logic [GAL_W-1:0] gal;
  } match_t;

  match_t table_q [2**PRB_W];

  logic             m_valid;
  logic [AMP_W-1:0] m_amp;
  logic [CO_W-1:0]  m_row, m_col;
  logic             end_d;
  logic             have;
  logic [AMP_W-1:0] cur_amp;
  logic [CO_W-1:0]  cur_row, cur_col;
  match_t           old;

  // stage 1: magnitude
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid <= 1'b0;
      m_amp   <= '0;
      m_row   <= '0;
      m_col   <= '0;
      end_d   <= 1'b0;
    end else begin
      m_valid <= in_valid;
      m_amp   <= AMP_W'(in_re * in_re) + AMP_W'(in_im * in_im);
      m_row   <= in_row;
      m_col   <= in_col;
      end_d   <= frame_end;
    end
  end

  // stage 2: running maximum
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have <= 1'b0;
      cur_amp <= '0; cur_row <= '0; cur_col <= '0;
      peak_valid <= 1'b0;
      peak_amp <= '0; peak_row <= '0; peak_col <= '0;
    end else begin
      peak_valid <= 1'b0;
      if (frame_start) have <= 1'b0;
      else if (m_valid && (!have || m_amp > cur_amp)) begin
        have    <= 1'b1;
        cur_amp <= m_amp;
        cur_row <= m_row;
        cur_col <= m_col;
      end
      if (end_d) begin
        peak_valid <= 1'b1;
        peak_amp   <= cur_amp;
        peak_row   <= cur_row;
        peak_col   <= cur_col;
      end
    end
  end

  // best match per probe
  assign old = table_q[probe_idx];
  always_ff @(posedge clk) begin
    if (end_d && (gal_idx == '0 || cur_amp > old.amp))
      table_q[probe_idx] <= '{amp: cur_amp, row: cur_row, col: cur_col, gal: gal_idx};
    {res_amp, res_row, res_col, res_gal} <= table_q[res_addr];
  end

endmodule
