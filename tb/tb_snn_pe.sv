// tb_snn_pe: checks one SNN processing element (8 neurons, 7 active,
// excitatory parameters, global indices starting at 100) against the integer
// reference of the Izhikevich update over 12 sweeps with different constant
// currents per neuron. After every sweep it compares V and u of every neuron,
// the fired flag, the firing-vector count and entries, and that the sweep took
// n_active + 23 clocks of pipeline plus one clock to start and one to leave
// the drain state, with a neuron written back 23 clocks after it was issued.
module tb_snn_pe;
  import snn_pkg::*;
  import tb_snn_ref_pkg::*;

  localparam int NN = 8, NACT = 7, IDX_W = 10;
  logic clk = 0, rst_n = 0;
  logic init_start = 0, run_start = 0, busy, i_we = 0, fired;
  logic [IDX_W-1:0] base_idx = 10'd100;
  logic [$clog2(NN+1)-1:0] n_active = NACT;
  logic [$clog2(NN)-1:0] i_addr = '0, fv_addr = '0;
  state_t i_data = '0;
  logic [IDX_W-1:0] fv_data;
  logic [$clog2(NN+1)-1:0] fv_count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  snn_pe #(.NEURONS(NN), .IDX_W(IDX_W), .PARAM(EXCIT), .INIT_I(1'b1)) dut (.*);

  // issue-to-write-back latency in clock edges: stage 1 is loaded by the edge
  // that ends the issue cycle, the write-back happens on the edge that sees the
  // neuron in stage 23
  int cyc = 0, t_issue = -1, t_wb = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.pipe[1].valid && dut.pipe[1].n == 0) t_issue <= cyc - 1;
    if (dut.pipe[PIPE_DEPTH].valid && dut.pipe[PIPE_DEPTH].n == 0) t_wb <= cyc;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    longint rv[NN], ru[NN], ri[NN];
    bit rf[NN];
    int nf, t;
    int fl[$];
    repeat (30) @(posedge clk);   // long enough to flush the unreset pipelines
    rst_n = 1;
    @(negedge clk) init_start = 1;
    @(negedge clk) init_start = 0;
    while (busy) @(negedge clk);
    for (int n = 0; n < NN; n++) begin
      rv[n] = -65 * 4096; ru[n] = (819 * rv[n]) >>> 12;
      ri[n] = (n == 0) ? 0 : longint'(n) * 8 * 4096 + 1234;
      @(negedge clk) i_we = 1; i_addr = n[2:0]; i_data = state_t'(ri[n]);
    end
    @(negedge clk) i_we = 0;
    for (int s = 0; s < 12; s++) begin
      fl.delete();
      for (int n = 0; n < NACT; n++) begin
        izh_step(rv[n], ru[n], ri[n], R_EXC, rf[n]);
        if (rf[n]) fl.push_back(100 + n);
      end
      @(negedge clk) run_start = 1;
      @(negedge clk) run_start = 0;
      t = 1;
      while (busy) begin @(negedge clk); t++; end
      check(t_wb - t_issue == 23, $sformatf("sweep %0d latency %0d", s, t_wb - t_issue));
      check(t == NACT + 23 + 2, $sformatf("sweep %0d took %0d clocks", s, t));
      for (int n = 0; n < NN; n++) begin
        check(longint'(dut.v_mem[n]) == rv[n] && longint'(dut.u_mem[n]) == ru[n],
              $sformatf("sweep %0d neuron %0d V %0d u %0d exp %0d %0d", s, n, dut.v_mem[n], dut.u_mem[n], rv[n], ru[n]));
      end
      check(int'(fv_count) == fl.size(), $sformatf("sweep %0d fired count %0d exp %0d", s, fv_count, fl.size()));
      check(fired == (fl.size() != 0), $sformatf("sweep %0d fired flag", s));
      foreach (fl[e]) begin
        @(negedge clk) fv_addr = e[2:0];
        @(negedge clk);
        check(int'(fv_data) == fl[e], $sformatf("sweep %0d fv[%0d] = %0d exp %0d", s, e, fv_data, fl[e]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
