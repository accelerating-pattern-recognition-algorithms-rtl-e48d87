// snn_pe: spiking neural network processing element.
//
// The PE owns a block of NEURONS Izhikevich neurons. Their membrane potential
// V, recovery variable u and input current I live in local on-chip memories.
// On run_start the PE streams neurons 0..n_active-1 through a 23-stage
// fixed-point pipeline, one neuron per clock, and writes the updated V and u
// back 23 cycles after the neuron entered. Per neuron it evaluates
//   dV = 0.04 V^2 + 5 V + 140 - u + I        V' = V + dV/2
//   du = a (b V - u)                          u' = u + du
// and, if V' >= 30 mV, resets V' = c, u' = u' + d and appends the neuron's
// global index (base_idx + local index) to the local firing vector, also
// raising the PE's fired flag. The firing vector is cleared at each
// run_start.
//
// Pipeline (stage numbers count clocks after issue):
//   1      A  load V, u, I from memory
//   2-9    B  intermediate values: V*V, b*V, 5V (2), multiplier delay (3-4),
//            scale (5), 0.04*V^2 and bV-u (6), delay (7-8), a(bV-u) (9)
//   10-13  C  dV = 0.04V^2 + 5V + 140 - u + I, one adder per stage
//   13     D  du
//   14     E/F V' and u' updates
//   15-16     threshold compare and reset
//   17-23     delay to the write-back stage (models the deeply pipelined
//            FPGA multipliers and BRAM ports of the original 23-stage design)
// The stage count, the streaming of one neuron per clock, Q.12 arithmetic and
// the local firing vector and flag follow the source design; how the
// individual operations are spread over the 23 stages is this design's own.
//
// Interface: init_start writes V = -65 mV, u = b*V to every neuron (NEURONS
// cycles), and I = 0 when INIT_I is set (the level-2 PE; a level-1 PE keeps
// the currents of the image loaded before start). i_we/i_addr/i_data write a neuron's input current (the
// level-1 image load or the level-2 currents from the L2 current module);
// they must only be used while busy is low. fv_addr selects a firing-vector
// entry, returned on fv_data one clock later. busy is high from the start
// command until the last write-back. The pipeline registers have no reset;
// hold rst_n low for at least 24 clocks so they flush before the first start.
module snn_pe
  import snn_pkg::*;
#(
  parameter int         NEURONS = 369,
  parameter int         IDX_W   = 14,
  parameter izh_param_t PARAM   = EXCIT,
  parameter bit         INIT_I  = 1'b0   // init also clears the currents
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [IDX_W-1:0]            base_idx,
  input  logic [$clog2(NEURONS+1)-1:0] n_active,
  input  logic                        init_start,
  input  logic                        run_start,
  output logic                        busy,
  input  logic                        i_we,
  input  logic [$clog2(NEURONS)-1:0]  i_addr,
  input  state_t                      i_data,
  input  logic [$clog2(NEURONS)-1:0]  fv_addr,
  output logic [IDX_W-1:0]            fv_data,
  output logic [$clog2(NEURONS+1)-1:0] fv_count,
  output logic                        fired
);

  localparam int AW = $clog2(NEURONS);
  localparam int CW = $clog2(NEURONS+1);
  typedef logic signed [63:0] prod_t;

  typedef struct packed {
    logic          valid;
    logic [AW-1:0] n;
    state_t        v;
    state_t        u;
    state_t        i;
    prod_t         pa;      // V*V, later 0.04*V^2 product
    prod_t         pb;      // b*V, later a*(bV-u) product
    wide_t         v5;      // 5V
    wide_t         acc;     // dV partial sums
    wide_t         bvu;     // bV - u, later du
    logic          fire;
  } stage_t;

  state_t        v_mem  [NEURONS];
  state_t        u_mem  [NEURONS];
  state_t        i_mem  [NEURONS];
  logic [IDX_W-1:0] fv_mem [NEURONS];

  stage_t pipe [1:PIPE_DEPTH];

  typedef enum logic [1:0] {S_IDLE, S_INIT, S_RUN, S_DRAIN} pe_state_e;
  pe_state_e     state;
  logic [AW-1:0] cnt;
  logic          issue;
  logic          pipe_busy;

  assign issue = (state == S_RUN);

  always_comb begin
    pipe_busy = 1'b0;
    for (int k = 1; k <= PIPE_DEPTH; k++) pipe_busy |= pipe[k].valid;
  end

  assign busy = (state != S_IDLE);

  // sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (init_start) state <= S_INIT;
          else if (run_start) state <= (n_active == '0) ? S_IDLE : S_RUN;
        end
        S_INIT: begin
          cnt <= cnt + 1'b1;
          if (CW'(cnt) == CW'(NEURONS - 1)) state <= S_IDLE;
        end
        S_RUN: begin
          cnt <= cnt + 1'b1;
          if (CW'(cnt) + 1'b1 == n_active) state <= S_DRAIN;
        end
        S_DRAIN: if (!pipe_busy) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // stage 1: memory read (A)
  always_ff @(posedge clk) begin
    pipe[1]       <= '0;
    pipe[1].valid <= issue;
    pipe[1].n     <= cnt;
    pipe[1].v     <= v_mem[cnt];
    pipe[1].u     <= u_mem[cnt];
    pipe[1].i     <= i_mem[cnt];
  end

  // stages 2..23
  always_ff @(posedge clk) begin
    for (int k = 2; k <= PIPE_DEPTH; k++) pipe[k] <= pipe[k-1];
    // B: products
    pipe[2].pa <= prod_t'(pipe[1].v) * prod_t'(pipe[1].v);
    pipe[2].pb <= prod_t'(PARAM.b) * prod_t'(pipe[1].v);
    pipe[2].v5 <= wide_t'(pipe[1].v) * 5;
    // B: scale back to Q.12
    pipe[5].pa <= pipe[4].pa >>> FRAC;
    pipe[5].pb <= pipe[4].pb >>> FRAC;
    pipe[6].pa <= pipe[5].pa * prod_t'(K_004);
    pipe[6].bvu <= wide_t'(pipe[5].pb) - wide_t'(pipe[5].u);
    pipe[9].pa <= pipe[8].pa >>> FRAC;
    pipe[9].pb <= prod_t'(PARAM.a) * prod_t'(pipe[8].bvu);
    // C: dV
    pipe[10].acc <= wide_t'(pipe[9].pa) + pipe[9].v5;
    pipe[11].acc <= pipe[10].acc + wide_t'(K_140);
    pipe[12].acc <= pipe[11].acc - wide_t'(pipe[11].u);
    pipe[13].acc <= pipe[12].acc + wide_t'(pipe[12].i);
    // D: du
    pipe[13].bvu <= wide_t'(pipe[12].pb >>> FRAC);
    // E, F: updates
    pipe[14].v <= state_t'(wide_t'(pipe[13].v) + (pipe[13].acc >>> 1));
    pipe[14].u <= state_t'(wide_t'(pipe[13].u) + pipe[13].bvu);
    // threshold and reset
    pipe[15].fire <= (pipe[14].v >= V_TH);
    if (pipe[15].fire) begin
      pipe[16].v <= PARAM.c;
      pipe[16].u <= pipe[15].u + PARAM.d;
    end
  end

  // memories: init, current writes, write-back, firing vector
  state_t u_init;
  assign u_init = state_t'((prod_t'(PARAM.b) * prod_t'(V_INIT)) >>> FRAC);

  always_ff @(posedge clk) begin
    if (state == S_INIT) begin
      v_mem[cnt] <= V_INIT;
      u_mem[cnt] <= u_init;
      if (INIT_I) i_mem[cnt] <= '0;
    end else begin
      if (i_we) i_mem[i_addr] <= i_data;
      if (pipe[PIPE_DEPTH].valid) begin
        v_mem[pipe[PIPE_DEPTH].n] <= pipe[PIPE_DEPTH].v;
        u_mem[pipe[PIPE_DEPTH].n] <= pipe[PIPE_DEPTH].u;
      end
    end
    if (pipe[PIPE_DEPTH].valid && pipe[PIPE_DEPTH].fire)
      fv_mem[fv_count[AW-1:0]] <= base_idx + IDX_W'(pipe[PIPE_DEPTH].n);
    fv_data <= fv_mem[fv_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fv_count <= '0;
      fired    <= 1'b0;
    end else if (state == S_IDLE && (run_start || init_start)) begin
      fv_count <= '0;
      fired    <= 1'b0;
    end else if (pipe[PIPE_DEPTH].valid && pipe[PIPE_DEPTH].fire) begin
      fv_count <= fv_count + 1'b1;
      fired    <= 1'b1;
    end
  end

  // current writes are only legal between sweeps
  a_no_write_while_busy: assert property (@(posedge clk) disable iff (!rst_n) i_we |-> !busy);

endmodule
