// tb_fp_peak: streams random correlation planes (N = 16) into the peak
// detector for two probe images and several gallery samples each, with one
// planted peak per plane. It checks the per-plane peak (amplitude and
// coordinates, one clock after the magnitude stage) and the best-match table
// read back at the end: the largest peak over all gallery samples of a probe
// must win, and gallery sample 0 must overwrite a stale entry.
module tb_fp_peak;
  localparam int W = 20, N = 16, GAL_W = 5, PRB_W = 2, CO_W = 4, AMP_W = 40;
  logic clk = 0, rst_n = 0;
  logic frame_start = 0, frame_end = 0, in_valid = 0;
  logic [PRB_W-1:0] probe_idx = 0, res_addr = 0;
  logic [GAL_W-1:0] gal_idx = 0;
  logic signed [W-1:0] in_re, in_im;
  logic [CO_W-1:0] in_row, in_col;
  logic peak_valid;
  logic [AMP_W-1:0] peak_amp, res_amp;
  logic [CO_W-1:0] peak_row, peak_col, res_row, res_col;
  logic [GAL_W-1:0] res_gal;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  fp_peak #(.W(W), .N(N), .GAL_W(GAL_W), .PRB_W(PRB_W)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one plane with the peak value pk at (pr, pc); other samples stay below 1000
  task automatic plane(int p, int g, int pk, int pr, int pc);
    longint e;
    probe_idx = PRB_W'(p); gal_idx = GAL_W'(g);
    @(negedge clk) frame_start = 1;
    @(negedge clk) frame_start = 0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        in_valid = 1; in_row = CO_W'(r); in_col = CO_W'(c);
        if (r == pr && c == pc) begin in_re = W'(-pk); in_im = W'(pk / 2); end
        else begin
          in_re = W'($signed($urandom_range(1400)) - 700);
          in_im = W'($signed($urandom_range(1400)) - 700);
        end
        @(negedge clk);
      end
    in_valid = 0;
    frame_end = 1;
    @(negedge clk) frame_end = 0;
    @(posedge clk); #1;
    e = longint'(pk) * pk + longint'(pk / 2) * (pk / 2);
    check(peak_valid && peak_amp == AMP_W'(e) && peak_row == CO_W'(pr) && peak_col == CO_W'(pc),
          $sformatf("plane p%0d g%0d: valid %0b amp %0d (%0d,%0d), exp %0d (%0d,%0d)", p, g,
                    peak_valid, peak_amp, peak_row, peak_col, e, pr, pc));
  endtask

  task automatic read_res(int p, int pk, int pr, int pc, int g);
    longint e = longint'(pk) * pk + longint'(pk / 2) * (pk / 2);
    @(negedge clk) res_addr = PRB_W'(p);
    @(negedge clk);
    check(res_amp == AMP_W'(e) && res_row == CO_W'(pr) && res_col == CO_W'(pc) && res_gal == GAL_W'(g),
          $sformatf("table p%0d: amp %0d (%0d,%0d) g%0d, exp %0d (%0d,%0d) g%0d", p, res_amp,
                    res_row, res_col, res_gal, e, pr, pc, g));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // a first pass leaves stale entries
    plane(0, 0, 90000, 1, 1);
    plane(1, 0, 90000, 2, 2);
    // second pass: gallery 0 must overwrite
    plane(0, 0, 3000, 4, 5);
    plane(1, 0, 5000, 15, 0);
    plane(0, 1, 8000, 9, 3);     // new best for probe 0
    plane(1, 1, 4000, 7, 7);     // smaller, probe 1 keeps gallery 0
    plane(0, 2, 6000, 0, 15);
    plane(1, 2, 9000, 12, 13);   // new best for probe 1
    plane(0, 3, 7999, 3, 3);
    read_res(0, 8000, 9, 3, 1);
    read_res(1, 9000, 12, 13, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
