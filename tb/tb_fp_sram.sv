// tb_fp_sram: behavioural model of the three off-chip SRAM banks used by the
// fingerprint correlator. Each bank takes one read or write per clock and
// returns read data LATENCY clocks after the request, in order. Unwritten
// words read as zero.
module tb_fp_sram #(
  parameter int NB      = 3,
  parameter int AW      = 19,
  parameter int LATENCY = 4
) (
  input  logic          clk,
  input  logic [NB-1:0] re,
  input  logic [NB-1:0] we,
  input  logic [AW-1:0] addr  [NB],
  input  logic [63:0]   wdata [NB],
  output logic [NB-1:0] rvalid,
  output logic [63:0]   rdata [NB]
);
  logic [63:0] mem [NB][int];
  logic [NB-1:0] vp [LATENCY];
  logic [63:0]   dp [LATENCY][NB];

  initial for (int k = 0; k < LATENCY; k++) vp[k] = '0;

  always @(posedge clk) begin
    for (int b = 0; b < NB; b++) begin
      if (we[b]) mem[b][int'(addr[b])] = wdata[b];
      dp[0][b] <= mem[b].exists(int'(addr[b])) ? mem[b][int'(addr[b])] : 64'd0;
    end
    vp[0] <= re;
    for (int k = 1; k < LATENCY; k++) begin
      vp[k] <= vp[k-1];
      dp[k] <= dp[k-1];
    end
  end

  assign rvalid = vp[LATENCY-1];
  assign rdata  = dp[LATENCY-1];
endmodule
