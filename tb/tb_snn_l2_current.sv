// tb_snn_l2_current: checks the L2 current module with three modelled level-1
// PEs (firing vectors held in the testbench, read one clock after the
// address), eight level-2 neurons (two SRAM words per index) and the weight
// SRAM model with its 11-clock latency. Scenarios: PE 0 and PE 2 fired, PE 1
// did not; only PE 1 fired; nothing fired. It checks every level-2 current
// written against the sum of the test weights, that exactly N2 currents are
// written, that the number of SRAM reads is N2/4 per fired index, and that the
// reads for one PE's firing vector leave back to back, one per clock.
module tb_snn_l2_current;
  import snn_pkg::*;
  import tb_snn_ref_pkg::*;

  localparam int N_PE = 3, FV_AW = 3, CW = 4, IDX_W = 8, N2 = 8, SAW = 12, ALPHA = 100;
  localparam int WPI = N2 / 4;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [N_PE-1:0] pe_fired;
  logic [CW-1:0] pe_count [N_PE];
  logic [$clog2(N_PE+1)-1:0] fv_sel;
  logic [FV_AW-1:0] fv_addr;
  logic [IDX_W-1:0] fv_data;
  logic sram_req, sram_rvalid;
  logic [SAW-1:0] sram_addr;
  logic [63:0] sram_rdata;
  logic l2_we;
  logic [$clog2(N2)-1:0] l2_addr;
  state_t l2_data;
  int n_req;
  int checks = 0, failures = 0;

  int fvs [N_PE][$];
  always #5 clk = ~clk;

  snn_l2_current #(.N_PE(N_PE), .FV_AW(FV_AW), .CW(CW), .IDX_W(IDX_W), .N2(N2), .SRAM_AW(SAW)) dut (.*);
  tb_weight_sram #(.LATENCY(11), .AW(SAW), .N2(N2), .ALPHA(ALPHA)) u_sram (
    .clk, .req(sram_req), .addr(sram_addr), .rvalid(sram_rvalid), .rdata(sram_rdata), .n_req);

  always_ff @(posedge clk)
    fv_data <= (int'(fv_sel) < N_PE && int'(fv_addr) < fvs[fv_sel].size()) ? IDX_W'(fvs[fv_sel][fv_addr]) : '0;

  always_comb
    for (int p = 0; p < N_PE; p++) begin
      pe_count[p] = CW'(fvs[p].size());
      pe_fired[p] = fvs[p].size() != 0;
    end

  // longest run of back-to-back requests
  int run_len = 0, max_run = 0;
  always @(posedge clk) begin
    if (sram_req) begin
      run_len = run_len + 1;
      if (run_len > max_run) max_run = run_len;
    end else run_len = 0;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic scenario(int sc);
    longint expect_i [N2];
    int nidx, req0, nwr, longest;
    for (int p = 0; p < N_PE; p++) fvs[p].delete();
    case (sc)
      0: begin fvs[0] = '{3, 7}; fvs[2] = '{20, 21, 22, 40}; end
      1: begin fvs[1] = '{5}; end
      default: ;
    endcase
    nidx = 0; longest = 0;
    for (int p = 0; p < N_PE; p++) begin
      nidx += fvs[p].size();
      if (fvs[p].size() * WPI > longest) longest = fvs[p].size() * WPI;
    end
    for (int j = 0; j < N2; j++) begin
      expect_i[j] = 0;
      for (int p = 0; p < N_PE; p++) foreach (fvs[p][e]) expect_i[j] += weight(fvs[p][e], j, ALPHA);
    end
    req0 = n_req;
    max_run = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    nwr = 0;
    while (busy) begin
      if (l2_we) begin
        nwr++;
        check(longint'(l2_data) == expect_i[l2_addr],
              $sformatf("scenario %0d I[%0d] = %0d exp %0d", sc, l2_addr, l2_data, expect_i[l2_addr]));
      end
      @(negedge clk);
    end
    check(nwr == N2, $sformatf("scenario %0d wrote %0d currents", sc, nwr));
    check(n_req - req0 == nidx * WPI, $sformatf("scenario %0d SRAM reads %0d exp %0d", sc, n_req - req0, nidx * WPI));
    check(max_run >= longest, $sformatf("scenario %0d longest request burst %0d exp %0d", sc, max_run, longest));
  endtask

  initial begin
    repeat (30) @(posedge clk);   // long enough to flush the unreset pipelines
    rst_n = 1;
    scenario(0);
    scenario(1);
    scenario(2);
    scenario(0);
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
