// fp_fft: one-dimensional forward FFT unit of the fingerprint correlator.
//
// Computes X[k] = sum_n x[n] exp(-j 2 pi n k / N) over one row or column of
// N complex samples (N a power of two). The source design used vendor FFT
// cores here and gives only their function and widths; this unit is a simple
// radix-2 decimation-in-time engine of this design's own:
//   load     N samples in natural order, stored at bit-reversed addresses;
//   compute  log2(N) stages of N/2 butterflies, one butterfly per clock, in
//            place in a register file;
//   unload   N results in natural order (out_idx = k).
// One transform takes N + (N/2)log2(N) + N clocks (704 for N = 128) and the
// next load may start when the unload ends. No scaling is applied: the output
// is OW = IW + log2(N) bits wide, enough for any input, so an 8-bit image row
// gives 16-bit results as in the source design. Twiddle factors are 18-bit
// values with 16 fractional bits, computed at elaboration from cos/sin;
// products are rounded to nearest.
//
// Handshake: in_ready is high while the unit takes samples; a sample is taken
// on each clock with in_valid and in_ready. out_valid marks the N results.
module fp_fft #(
  parameter int N  = 128,
  parameter int IW = 16,
  parameter int OW = IW + $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [IW-1:0] in_re,
  input  logic signed [IW-1:0] in_im,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_idx,
  output logic signed [OW-1:0] out_re,
  output logic signed [OW-1:0] out_im
);

  localparam int LN   = $clog2(N);
  localparam int TW_W = 18;
  localparam int TW_F = 16;

  typedef logic signed [TW_W-1:0] tw_t;
  typedef tw_t tw_tab_t [N/2];

  function automatic tw_tab_t gen_cos();
    tw_tab_t t;
    for (int k = 0; k < N/2; k++)
      t[k] = tw_t'($rtoi($floor($cos(2.0 * 3.14159265358979323846 * k / N) * (2.0 ** TW_F) + 0.5)));
    return t;
  endfunction

  function automatic tw_tab_t gen_msin();   // -sin
    tw_tab_t t;
    for (int k = 0; k < N/2; k++)
      t[k] = tw_t'($rtoi($floor(-$sin(2.0 * 3.14159265358979323846 * k / N) * (2.0 ** TW_F) + 0.5)));
    return t;
  endfunction

  localparam tw_tab_t W_RE = gen_cos();
  localparam tw_tab_t W_IM = gen_msin();

  function automatic logic [LN-1:0] bitrev(input logic [LN-1:0] a);
    for (int b = 0; b < LN; b++) bitrev[b] = a[LN-1-b];
  endfunction

  typedef enum logic [1:0] {S_LOAD, S_COMP, S_UNLOAD} fft_state_e;
  fft_state_e state;

  logic signed [OW-1:0] mre [N];
  logic signed [OW-1:0] mim [N];

  logic [LN-1:0]           cnt;       // sample / butterfly counter
  logic [$clog2(LN+1)-1:0] stage;

  // butterfly addressing for stage s: span h = 2^s
  logic [LN-1:0] i0, i1, twi;
  always_comb begin
    logic [LN-1:0] pos, grp;
    pos = cnt & LN'((1 << stage) - 1);
    grp = LN'((int'(cnt) >> stage) << (stage + 1));
    i0  = grp | pos;
    i1  = i0 + LN'(1 << stage);
    twi = LN'(int'(pos) << (LN - 1 - int'(stage)));
  end

  // butterfly datapath
  localparam int PW = OW + TW_W + 1;
  logic signed [PW-1:0] pr, pi;
  logic signed [OW-1:0] tr, ti;
  logic signed [TW_W-1:0] wr, wi;
  always_comb begin
    wr = W_RE[twi[LN-2:0]];
    wi = W_IM[twi[LN-2:0]];
    pr = PW'(mre[i1]) * PW'(wr) - PW'(mim[i1]) * PW'(wi);
    pi = PW'(mre[i1]) * PW'(wi) + PW'(mim[i1]) * PW'(wr);
    tr = OW'((pr + (PW'(1) <<< (TW_F - 1))) >>> TW_F);
    ti = OW'((pi + (PW'(1) <<< (TW_F - 1))) >>> TW_F);
  end

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_UNLOAD);
  assign out_idx   = cnt;
  assign out_re    = mre[cnt];
  assign out_im    = mim[cnt];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      cnt   <= '0;
      stage <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == LN'(N - 1)) begin
            state <= S_COMP;
            stage <= '0;
            cnt   <= '0;
          end
        end
        S_COMP: begin
          if (cnt == LN'(N/2 - 1)) begin
            cnt <= '0;
            if (int'(stage) == LN - 1) state <= S_UNLOAD;
            else stage <= stage + 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        S_UNLOAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == LN'(N - 1)) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) begin
      mre[bitrev(cnt)] <= OW'(in_re);
      mim[bitrev(cnt)] <= OW'(in_im);
    end else if (state == S_COMP) begin
      mre[i0] <= mre[i0] + tr;
      mim[i0] <= mim[i0] + ti;
      mre[i1] <= mre[i0] - tr;
      mim[i1] <= mim[i0] - ti;
    end
  end

endmodule
