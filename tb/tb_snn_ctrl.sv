// tb_snn_ctrl: checks the SNN controller against modelled PEs and L2 current
// module (each busy for a few clocks after its start pulse). Scenario 1: the
// level-2 PE reports a firing after sweep 4 (cycle count 3 in zero-based
// counting); the controller must stop there with the class index latched.
// Scenario 2: no level-2 neuron ever fires; the controller must run exactly
// MAX_CYCLES = 12 sweeps and current computations and finish without a
// recognition. It also checks the order of operations: an initialisation
// first, then sweep and current computation alternating, never overlapping.
module tb_snn_ctrl;
  localparam int CLS_W = 6;
  logic clk = 0, rst_n = 0, start = 0;
  logic pe_init, pe_run, pe_busy, l2_fired, cur_start, cur_busy;
  logic [CLS_W-1:0] l2_first_idx;
  logic finished, recognized;
  logic [CLS_W-1:0] class_idx;
  logic [7:0] cycle_count;
  int checks = 0, failures = 0;
  int fire_after;            // sweep number after which L2 fires (0 = never)
  int n_init, n_run, n_cur, pe_left, cur_left;
  bit overlap;

  always #5 clk = ~clk;
  snn_ctrl #(.MAX_CYCLES(12), .CLS_W(CLS_W)) dut (.*);

  assign pe_busy  = pe_left != 0;
  assign cur_busy = cur_left != 0;
  assign l2_first_idx = 6'd37;
  assign l2_fired = fire_after != 0 && n_run >= fire_after && !pe_busy;

  always @(posedge clk) begin
    if (pe_init) begin n_init++; pe_left <= 9; end
    else if (pe_run) begin n_run++; pe_left <= 5; end
    else if (pe_left != 0) pe_left <= pe_left - 1;
    if (cur_start) begin n_cur++; cur_left <= 7; end
    else if (cur_left != 0) cur_left <= cur_left - 1;
    if ((pe_busy || pe_run) && (cur_busy || cur_start)) overlap = 1;
    if (pe_run && n_init == 0) overlap = 1;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic scenario(int fa);
    fire_after = fa;
    n_init = 0; n_run = 0; n_cur = 0; overlap = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    check(!finished, "finished not cleared by start");
    wait (finished);
    @(negedge clk);
    check(n_init == 1, $sformatf("%0d initialisations", n_init));
    check(!overlap, "sweep and current computation overlapped or ran before init");
    if (fa != 0) begin
      check(recognized && class_idx == 37, "recognition not reported");
      check(int'(cycle_count) == fa - 1, $sformatf("cycle count %0d exp %0d", cycle_count, fa - 1));
      check(n_run == fa && n_cur == fa - 1, $sformatf("sweeps %0d currents %0d", n_run, n_cur));
    end else begin
      check(!recognized, "recognition reported without a firing");
      check(int'(cycle_count) == 12, $sformatf("cycle count %0d exp 12", cycle_count));
      check(n_run == 12 && n_cur == 12, $sformatf("sweeps %0d currents %0d", n_run, n_cur));
    end
  endtask

  initial begin
    pe_left = 0; cur_left = 0; fire_after = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    scenario(4);
    scenario(0);
    scenario(1);
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
