// fp_buffer: on-chip dual-port buffer (block RAM) of the fingerprint
// correlator, used for the image buffers fn and gn and the intermediate
// buffers mb0, mb1 and mb2.
//
// One write port and one read port, both synchronous: a write with we takes
// effect at the clock edge; rdata shows the word at raddr one clock after
// raddr is applied. Reading the address being written returns the old word.
// Depth and width are parameters; the buffers hold one 128 x 128 image or
// intermediate plane in the source design. Contents are not reset.
module fp_buffer #(
  parameter int DEPTH = 16384,
  parameter int W     = 32
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
