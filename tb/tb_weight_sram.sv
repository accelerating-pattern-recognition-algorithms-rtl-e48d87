// tb_weight_sram: behavioural model of the off-chip weight SRAM.
//
// Accepts one read request per clock and returns the addressed 64-bit word
// LATENCY clocks later, in order (11 clocks for the SRAM of the source
// design). Contents are computed from the test weight function instead of
// being stored. Counts requests so a testbench can check streaming.
module tb_weight_sram
  import tb_snn_ref_pkg::*;
#(
  parameter int LATENCY = 11,
  parameter int AW      = 20,
  parameter int N2      = 48,
  parameter int ALPHA   = 64
) (
  input  logic          clk,
  input  logic          req,
  input  logic [AW-1:0] addr,
  output logic          rvalid,
  output logic [63:0]   rdata,
  output int            n_req
);
  logic        v_pipe [LATENCY];
  logic [63:0] d_pipe [LATENCY];

  initial begin
    n_req = 0;
    for (int k = 0; k < LATENCY; k++) v_pipe[k] = 1'b0;
  end

  always @(posedge clk) begin
    v_pipe[0] <= req;
    d_pipe[0] <= sram_word(int'(addr), N2, ALPHA);
    for (int k = 1; k < LATENCY; k++) begin
      v_pipe[k] <= v_pipe[k-1];
      d_pipe[k] <= d_pipe[k-1];
    end
    if (req) n_req <= n_req + 1;
  end

  assign rvalid = v_pipe[LATENCY-1];
  assign rdata  = d_pipe[LATENCY-1];
endmodule
