// fp_pof_mult: phase-only filter and spectrum product of the fingerprint
// correlator.
//
// For each frequency bin it receives the probe spectrum F and the gallery
// spectrum G (both complex, IW bits) and returns P = F * H_POF, where
// H_POF = conj(G)/|G| = exp(-j phase(G)) is the gallery spectrum normalised to
// the unit circle and conjugated. The source design names these three steps
// (normalise, conjugate, multiply) but not how they are done; here they are
// folded into one CORDIC pipeline of this design's own: G is driven onto the
// positive real axis by ITER micro-rotations (vectoring), and F receives the
// very same micro-rotations, so it ends rotated by -phase(G), i.e. multiplied
// by H_POF. A 180-degree pre-rotation covers the left half plane, and the
// CORDIC gain is removed with one constant multiply at the end.
//
// P is returned with 12 fractional bits in OW = 36 bits per component (the
// 36-bit mb1 word width of the source design). A bin with G = 0 has no phase;
// it is then rotated by an arbitrary but fixed angle.
//
// Timing: fully pipelined, one bin per clock, out_valid = in_valid delayed by
// ITER + 2 clocks. busy is high while any bin is inside the pipeline.
module fp_pof_mult #(
  parameter int IW   = 23,
  parameter int OW   = 36,
  parameter int ITER = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] f_re,
  input  logic signed [IW-1:0] f_im,
  input  logic signed [IW-1:0] g_re,
  input  logic signed [IW-1:0] g_im,
  output logic                 busy,
  output logic                 out_valid,
  output logic signed [OW-1:0] p_re,
  output logic signed [OW-1:0] p_im
);

  localparam int FRAC = 12;
  localparam int XW   = IW + FRAC + 2;      // probe path width
  localparam int GF   = ITER;               // extra gallery fraction bits, keep small |G| precise
  localparam int GW   = IW + 2 + GF;        // gallery path width
  localparam int INVK = 39797;              // 1/K = 0.607253 with 16 fractional bits

  typedef struct packed {
    logic                 valid;
    logic signed [XW-1:0] fx, fy;
    logic signed [GW-1:0] gx, gy;
  } cstage_t;

  cstage_t s [0:ITER];

  // stage 0: pre-rotation by 180 degrees when G lies in the left half plane
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s[0] <= '0;
    else begin
      s[0].valid <= in_valid;
      if (g_re < 0) begin
        s[0].gx <= -(GW'(g_re) <<< GF);
        s[0].gy <= -(GW'(g_im) <<< GF);
        s[0].fx <= -(XW'(f_re) <<< FRAC);
        s[0].fy <= -(XW'(f_im) <<< FRAC);
      end else begin
        s[0].gx <= GW'(g_re) <<< GF;
        s[0].gy <= GW'(g_im) <<< GF;
        s[0].fx <= XW'(f_re) <<< FRAC;
        s[0].fy <= XW'(f_im) <<< FRAC;
      end
    end
  end

  // CORDIC micro-rotations, direction chosen by the gallery vector
  for (genvar i = 0; i < ITER; i++) begin : g_iter
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) s[i+1] <= '0;
      else begin
        s[i+1].valid <= s[i].valid;
        if (s[i].gy >= 0) begin        // rotate by -atan(2^-i)
          s[i+1].gx <= s[i].gx + (s[i].gy >>> i);
          s[i+1].gy <= s[i].gy - (s[i].gx >>> i);
          s[i+1].fx <= s[i].fx + (s[i].fy >>> i);
          s[i+1].fy <= s[i].fy - (s[i].fx >>> i);
        end else begin                 // rotate by +atan(2^-i)
          s[i+1].gx <= s[i].gx - (s[i].gy >>> i);
          s[i+1].gy <= s[i].gy + (s[i].gx >>> i);
          s[i+1].fx <= s[i].fx - (s[i].fy >>> i);
          s[i+1].fy <= s[i].fy + (s[i].fx >>> i);
        end
      end
    end
  end

  always_comb begin
    busy = out_valid;
    for (int i = 0; i <= ITER; i++) busy |= s[i].valid;
  end

  // gain correction
  localparam int MW = XW + 18;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p_re <= '0;
      p_im <= '0;
    end else begin
      out_valid <= s[ITER].valid;
      p_re <= OW'((MW'(s[ITER].fx) * MW'(INVK) + (MW'(1) <<< 15)) >>> 16);
      p_im <= OW'((MW'(s[ITER].fy) * MW'(INVK) + (MW'(1) <<< 15)) >>> 16);
    end
  end

endmodule
