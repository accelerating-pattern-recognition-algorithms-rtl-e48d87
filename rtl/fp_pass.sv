// fp_pass: one-dimensional FFT pass over a stored N x N plane.
//
// Wraps one fp_fft unit and walks it over the lines of a plane held in an
// fp_buffer: rows (col_mode = 0) or columns (col_mode = 1), starting at line0
// and stepping by lstep for nlines lines, so two passes with line0 = 0 and 1
// and lstep = 2 split a plane between two FFT units. For every line it reads
// the N samples (src_addr, data expected on src_re/src_im one clock later),
// lets the FFT compute and streams the N results out with their row-major
// plane address (o_addr = row*N + column, where a row pass puts frequency k in
// the column and a column pass in the row). busy is high from start until the
// last result has left; done pulses once at the end.
// This line-by-line walk is how the source design builds a two-dimensional
// transform from two one-dimensional ones; the line split between units is
// this design's own.
module fp_pass #(
  parameter int N  = 128,
  parameter int IW = 16,
  parameter int OW = IW + $clog2(N),
  localparam int LN = $clog2(N),
  localparam int AW = 2 * $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 col_mode,
  input  logic [LN-1:0]        line0,
  input  logic [LN-1:0]        lstep,
  input  logic [LN:0]          nlines,
  output logic                 busy,
  output logic                 done,
  output logic [AW-1:0]        src_addr,
  input  logic signed [IW-1:0] src_re,
  input  logic signed [IW-1:0] src_im,
  output logic                 o_valid,
  output logic signed [OW-1:0] o_re,
  output logic signed [OW-1:0] o_im,
  output logic [AW-1:0]        o_addr
);

  typedef enum logic [1:0] {S_IDLE, S_FEED, S_OUT} pass_state_e;
  pass_state_e state;

  logic [LN-1:0] k, line;
  logic [LN:0]   left;
  logic          mode;
  logic          rd_d;
  logic          fft_ready, fft_ovalid;
  logic [LN-1:0] fft_oidx;

  assign busy     = (state != S_IDLE);
  assign src_addr = mode ? {k, line} : {line, k};

  fp_fft #(.N(N), .IW(IW), .OW(OW)) u_fft (
    .clk, .rst_n,
    .in_valid  (rd_d),
    .in_ready  (fft_ready),
    .in_re     (src_re),
    .in_im     (src_im),
    .out_valid (fft_ovalid),
    .out_idx   (fft_oidx),
    .out_re    (o_re),
    .out_im    (o_im)
  );

  assign o_valid = fft_ovalid && (state == S_OUT);
  assign o_addr  = mode ? {fft_oidx, line} : {line, fft_oidx};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      k <= '0; line <= '0; left <= '0; mode <= 1'b0; rd_d <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      rd_d <= (state == S_FEED);
      unique case (state)
        S_IDLE: if (start && nlines != '0) begin
          state <= S_FEED;
          mode  <= col_mode;
          line  <= line0;
          left  <= nlines;
          k     <= '0;
        end else if (start) done <= 1'b1;
        S_FEED: begin
          k <= k + 1'b1;
          if (k == LN'(N - 1)) state <= S_OUT;
        end
        S_OUT: if (fft_ovalid && fft_oidx == LN'(N - 1)) begin
          if (left == 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_FEED;
            line  <= line + lstep;
            left  <= left - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_fft_ready: assert property (@(posedge clk) disable iff (!rst_n) rd_d |-> fft_ready);

endmodule
