// snn_module: Izhikevich spiking-neural-network character recogniser.
//
// A two-level network: one level-1 neuron per pixel of a binary input image
// and one level-2 neuron per trained character, every level-1 neuron feeding
// every level-2 neuron through a weight w(i,j) held in off-chip SRAM. An "on"
// pixel drives its level-1 neuron with a constant current; a level-2 neuron's
// current is the sum of the weights of the level-1 neurons that fired in the
// previous cycle. The first level-2 neuron to fire names the character.
//
// Structure: N_PE level-1 processing elements share the N1 level-1 neurons
// evenly (consecutive blocks of ceil(N1/N_PE); the last PE may hold fewer), one
// level-2 PE holds the N2 level-2 neurons, the L2 current module turns level-1
// firing vectors into level-2 currents, and the controller sequences the
// recognition loop. All PEs sweep their neurons at the same time.
//
// Interface: the host writes the image one pixel per clock with img_we/
// img_addr/img_pixel (pixel index = row*width + column) while the module is
// idle, then pulses start. finished rises when a character was recognised or
// MAX_CYCLES cycles passed; recognized, class_idx and cycle_count then hold the
// result. The weight SRAM port issues one read request per clock
// (sram_req/sram_addr) and accepts in-order read data (sram_rvalid/
// sram_rdata) after any fixed latency; word i*(N2/4)+k holds the weights of
// level-1 neuron i for level-2 neurons 4k..4k+3, weight q in bits 16q+15:16q.
//
// Defaults are network two of the source design: 96x96 pixels, 9,216 level-1
// neurons on 25 PEs, 48 level-2 neurons on one PE. Network one is N1=576,
// N_PE=6. The pixel-to-PE mapping and the host write port are this design's
// own choices.
module snn_module
  import snn_pkg::*;
#(
  parameter int N1         = 9216,
  parameter int N2         = 48,
  parameter int N_PE       = 25,
  parameter int MAX_CYCLES = 12,
  parameter int SRAM_AW    = 20
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // host: image load and start
  input  logic                    img_we,
  input  logic [$clog2(N1)-1:0]   img_addr,
  input  logic                    img_pixel,
  input  logic                    start,
  // host: results
  output logic                    finished,
  output logic                    recognized,
  output logic [$clog2(N2)-1:0]   class_idx,
  output logic [7:0]              cycle_count,
  // off-chip weight SRAM
  output logic                    sram_req,
  output logic [SRAM_AW-1:0]      sram_addr,
  input  logic                    sram_rvalid,
  input  logic [SRAM_W-1:0]       sram_rdata
);

  localparam int M      = (N1 + N_PE - 1) / N_PE;   // neurons per level-1 PE
  localparam int IDX_W  = $clog2(N1);
  localparam int AW     = $clog2(M);
  localparam int CW     = $clog2(M + 1);
  localparam int CLS_W  = $clog2(N2);
  localparam int PW     = $clog2(N_PE + 1);

  logic              pe_init, pe_run;
  logic [N_PE-1:0]   l1_busy, l1_fired;
  logic [CW-1:0]     l1_count [N_PE];
  logic [IDX_W-1:0]  l1_fv_data [N_PE];
  logic [PW-1:0]     fv_sel;
  logic [AW-1:0]     fv_addr;
  logic [IDX_W-1:0]  fv_data;

  logic              l2_busy, l2_fired_flag;
  logic [IDX_W-1:0]  l2_fv_data;
  logic [$clog2(N2+1)-1:0] l2_count;
  logic              cur_start, cur_busy, cur_done;
  logic              l2_we;
  logic [CLS_W-1:0]  l2_addr;
  state_t            l2_data;

  // image pixel -> (PE, local neuron)
  logic [PW-1:0]     img_pe;
  logic [AW-1:0]     img_local;
  assign img_pe    = PW'(img_addr / IDX_W'(M));
  assign img_local = AW'(img_addr % IDX_W'(M));

  for (genvar p = 0; p < N_PE; p++) begin : g_l1
    localparam int NACT = (N1 - p * M < M) ? N1 - p * M : M;
    snn_pe #(.NEURONS(M), .IDX_W(IDX_W), .PARAM(EXCIT)) u_pe (
      .clk, .rst_n,
      .base_idx   (IDX_W'(p * M)),
      .n_active   (CW'(NACT)),
      .init_start (pe_init),
      .run_start  (pe_run),
      .busy       (l1_busy[p]),
      .i_we       (img_we && img_pe == PW'(p)),
      .i_addr     (img_local),
      .i_data     (img_pixel ? I_ON : '0),
      .fv_addr    (fv_addr),
      .fv_data    (l1_fv_data[p]),
      .fv_count   (l1_count[p]),
      .fired      (l1_fired[p])
    );
  end

  // shared firing-vector bus, mastered by the L2 current module
  always_comb begin
    fv_data = '0;
    for (int p = 0; p < N_PE; p++)
      if (fv_sel == PW'(p)) fv_data = l1_fv_data[p];
  end

  snn_pe #(.NEURONS(N2), .IDX_W(IDX_W), .PARAM(INHIB), .INIT_I(1'b1)) u_l2_pe (
    .clk, .rst_n,
    .base_idx   ('0),
    .n_active   ($clog2(N2+1)'(N2)),
    .init_start (pe_init),
    .run_start  (pe_run),
    .busy       (l2_busy),
    .i_we       (l2_we),
    .i_addr     (l2_addr),
    .i_data     (l2_data),
    .fv_addr    ('0),
    .fv_data    (l2_fv_data),
    .fv_count   (l2_count),
    .fired      (l2_fired_flag)
  );

  snn_l2_current #(
    .N_PE(N_PE), .FV_AW(AW), .CW(CW), .IDX_W(IDX_W), .N2(N2), .SRAM_AW(SRAM_AW)
  ) u_l2_cur (
    .clk, .rst_n,
    .start      (cur_start),
    .busy       (cur_busy),
    .done       (cur_done),
    .pe_fired   (l1_fired),
    .pe_count   (l1_count),
    .fv_sel     (fv_sel),
    .fv_addr    (fv_addr),
    .fv_data    (fv_data),
    .sram_req, .sram_addr, .sram_rvalid, .sram_rdata,
    .l2_we, .l2_addr, .l2_data
  );

  snn_ctrl #(.MAX_CYCLES(MAX_CYCLES), .CLS_W(CLS_W)) u_ctrl (
    .clk, .rst_n,
    .start,
    .pe_init, .pe_run,
    .pe_busy      ((|l1_busy) | l2_busy),
    .l2_fired     (l2_fired_flag),
    .l2_first_idx (l2_fv_data[CLS_W-1:0]),
    .cur_start, .cur_busy,
    .finished, .recognized, .class_idx, .cycle_count
  );

  a_img_idle: assert property (@(posedge clk) disable iff (!rst_n) img_we |-> !(|l1_busy));

endmodule
