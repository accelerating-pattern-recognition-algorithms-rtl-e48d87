// tb_snn_module: end-to-end test of the SNN character recogniser at the size
// of network one (24x24 pixels = 576 level-1 neurons on 6 PEs, 48 characters).
//
// For several characters k the testbench loads template k as the input image,
// starts the module and waits for finished. An integer reference model of the
// whole two-level network (tb_snn_ref_pkg) predicts which level-2 neuron fires
// first and in which cycle; the testbench compares class index, recognised
// flag and cycle count, checks that the number of weight-SRAM reads equals
// N2/4 words per level-1 spike, and bounds the compute time by the sum of the
// sweep and weight-streaming times (one SRAM word per clock).
module tb_snn_module;
  import tb_snn_ref_pkg::*;

  localparam int N1 = 576, N2 = 48, N_PE = 6, MAXC = 12, SAW = 20;
  localparam int ALPHA = 589824 / N1;
  localparam int M = (N1 + N_PE - 1) / N_PE;

  logic clk = 0, rst_n = 0;
  logic img_we = 0, img_pixel = 0, start = 0;
  logic [$clog2(N1)-1:0] img_addr = '0;
  logic finished, recognized;
  logic [$clog2(N2)-1:0] class_idx;
  logic [7:0] cycle_count;
  logic sram_req, sram_rvalid;
  logic [SAW-1:0] sram_addr;
  logic [63:0] sram_rdata;
  int n_req;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  snn_module #(.N1(N1), .N2(N2), .N_PE(N_PE), .MAX_CYCLES(MAXC), .SRAM_AW(SAW)) dut (.*);
  tb_weight_sram #(.LATENCY(11), .AW(SAW), .N2(N2), .ALPHA(ALPHA)) u_sram (
    .clk, .req(sram_req), .addr(sram_addr), .rvalid(sram_rvalid), .rdata(sram_rdata), .n_req);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // reference: returns class, recognised flag, cycle count, total L1 spikes used for weights
  task automatic ref_run(int k, output int cls, output bit rec, output int ncyc, output int nspk);
    longint v1[N1], u1[N1], v2[N2], u2[N2], i2[N2];
    bit f1[N1], f;
    cls = 0; rec = 0; ncyc = 0; nspk = 0;
    for (int i = 0; i < N1; i++) begin v1[i] = -65*4096; u1[i] = (819 * v1[i]) >>> 12; end
    for (int j = 0; j < N2; j++) begin v2[j] = -65*4096; u2[j] = (901 * v2[j]) >>> 12; i2[j] = 0; end
    for (int c = 0; c < MAXC; c++) begin
      for (int i = 0; i < N1; i++) izh_step(v1[i], u1[i], tmpl(k, i) ? 20*4096 : 0, R_EXC, f1[i]);
      for (int j = 0; j < N2; j++) begin
        izh_step(v2[j], u2[j], i2[j], R_INH, f);
        if (f && !rec) begin rec = 1; cls = j; end
      end
      if (rec) begin ncyc = c; return; end
      for (int j = 0; j < N2; j++) begin
        i2[j] = 0;
        for (int i = 0; i < N1; i++) if (f1[i]) i2[j] += weight(i, j, ALPHA);
      end
      for (int i = 0; i < N1; i++) nspk += int'(f1[i]);
    end
    ncyc = MAXC;
  endtask

  initial begin
    int tests[3];
    int cls, ncyc, nspk, req0;
    bit rec;
    longint t0, bound;
    tests = '{5, 0, 47};
    repeat (30) @(posedge clk);   // long enough to flush the unreset pipelines
    rst_n = 1;
    foreach (tests[t]) begin
      int k;
      k = tests[t];
      ref_run(k, cls, rec, ncyc, nspk);
      // load image
      for (int i = 0; i < N1; i++) begin
        @(negedge clk);
        img_we = 1; img_addr = i[$clog2(N1)-1:0]; img_pixel = tmpl(k, i);
      end
      @(negedge clk) img_we = 0;
      req0 = n_req;
      start = 1;
      @(negedge clk) start = 0;
      t0 = cyc;
      wait (finished);
      @(negedge clk);
      check(recognized == rec, $sformatf("char %0d recognised flag %0d exp %0d", k, recognized, rec));
      check(int'(class_idx) == cls, $sformatf("char %0d class %0d exp %0d", k, class_idx, cls));
      check(int'(cycle_count) == ncyc, $sformatf("char %0d cycle count %0d exp %0d", k, cycle_count, ncyc));
      check(cls == k, $sformatf("reference recognises char %0d as %0d", k, cls));
      check(n_req - req0 == nspk * (N2 / 4), $sformatf("char %0d SRAM reads %0d exp %0d", k, n_req - req0, nspk * (N2/4)));
      // time bound: init + per cycle (sweep + weights + writes + overhead)
      bound = M + 4 + (ncyc + 1) * (M + 30) + ncyc * (N_PE * 4 + 11 + N2 + 8) + nspk * (N2 / 4) + N1 / M * 3;
      check(cyc - t0 <= bound && cyc - t0 >= (ncyc + 1) * (M + 23),
            $sformatf("char %0d compute time %0d cycles, bound %0d", k, cyc - t0, bound));
      $display("char %0d -> class %0d in cycle %0d, %0d L1 spikes, %0d clocks", k, class_idx, cycle_count, nspk, cyc - t0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
