// tb_fp_fft: checks the FFT unit against a direct DFT computed with real
// arithmetic in the testbench, for random inputs, an impulse and a constant,
// at N = 32 and 16-bit inputs. Every output bin must be within a rounding
// tolerance of the DFT, and one transform must take N + (N/2)log2(N) + N
// clocks from first input to last output.
module tb_fp_fft;
  localparam int N = 32, IW = 16, OW = IW + $clog2(N);
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid;
  logic signed [IW-1:0] in_re = '0, in_im = '0;
  logic [$clog2(N)-1:0] out_idx;
  logic signed [OW-1:0] out_re, out_im;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fp_fft #(.N(N), .IW(IW)) dut (.*);

  real xr[N], xi[N];
  int cyc = 0, t_in0 = 0, t_outl = 0, nin = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && in_ready) begin
      if (nin % N == 0) t_in0 <= cyc;
      nin <= nin + 1;
    end
    if (out_valid) t_outl <= cyc;
  end
  function automatic real rabs(real x); return (x < 0) ? -x : x; endfunction

  task automatic run(int kind);
    real er, ei, tol;
    int t_first, t_last, t;
    for (int n = 0; n < N; n++) begin
      case (kind)
        0: begin xr[n] = $signed($urandom_range(0, 65535)) - 32768; xi[n] = $signed($urandom_range(0, 65535)) - 32768; end
        1: begin xr[n] = (n == 3) ? 1000 : 0; xi[n] = 0; end
        default: begin xr[n] = 255; xi[n] = 0; end
      endcase
    end
    t = 0;
    wait (in_ready);
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid = 1; in_re = IW'($rtoi(xr[n])); in_im = IW'($rtoi(xi[n]));
      if (n == 0) t_first = t;
      @(posedge clk); t++;
    end
    @(negedge clk) in_valid = 0;
    for (int k = 0; k < N; k++) begin
      while (!out_valid) begin @(posedge clk); t++; end
      er = 0; ei = 0;
      for (int n = 0; n < N; n++) begin
        er += xr[n] * $cos(2.0 * 3.14159265358979 * n * out_idx / N) + xi[n] * $sin(2.0 * 3.14159265358979 * n * out_idx / N);
        ei += xi[n] * $cos(2.0 * 3.14159265358979 * n * out_idx / N) - xr[n] * $sin(2.0 * 3.14159265358979 * n * out_idx / N);
      end
      tol = 4.0 + 1e-4 * ((rabs(er) > rabs(ei)) ? rabs(er) : rabs(ei));
      checks++;
      if (int'(out_idx) != k || rabs(real'(out_re) - er) > tol || rabs(real'(out_im) - ei) > tol) begin
        failures++;
        $display("FAIL kind %0d bin %0d idx %0d: got %0d %0d exp %f %f", kind, k, out_idx, out_re, out_im, er, ei);
      end
      t_last = t;
      @(posedge clk); t++;
    end
    checks++;
    @(posedge clk);
    if (t_outl - t_in0 + 1 != N + N / 2 * $clog2(N) + N) begin
      failures++;
      $display("FAIL transform took %0d clocks", t_outl - t_in0 + 1);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0); run(1); run(2); run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
