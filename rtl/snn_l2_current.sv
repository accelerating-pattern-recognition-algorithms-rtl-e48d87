// snn_l2_current: level-2 input current module of the SNN recogniser.
//
// It evaluates I(j) = sum_i w(i,j) f(i) for every level-2 neuron j, where f is
// the set of level-1 neurons that fired in the last sweep. The level-1 PEs are
// visited in turn (round robin, PE 0 first); for each PE whose fired flag is
// set, the module reads the global neuron indices out of that PE's firing
// vector over the shared bus (it is the only bus master) and streams weight
// requests to the off-chip SRAM: index i needs WPI = N2/4 consecutive 64-bit
// words starting at address i*WPI, each holding four 16-bit Q4.12 weights for
// level-2 neurons 4k..4k+3. Requests leave one per clock without gaps while a
// PE's vector is read (the next index is fetched while the current one's words
// are issued). Read data return in order after the SRAM latency and are added
// four at a time into the current accumulators. When every request has been
// answered, the N2 currents are written into the level-2 PE's current memory,
// one per clock (zeros when nothing fired).
//
// The round-robin scan, the index streaming, the 11-cycle SRAM latency this is
// built for, the 64-bit word of four 16-bit weights and the four-at-a-time
// accumulation follow the source design. The word layout in the SRAM, the
// clear-then-accumulate sequence and the bus handshake (select, address,
// data one clock later) are this design's own choices.
module snn_l2_current
  import snn_pkg::*;
#(
  parameter int N_PE    = 25,
  parameter int FV_AW   = 9,     // firing vector address width
  parameter int CW      = 9,     // firing vector count width
  parameter int IDX_W   = 14,
  parameter int N2      = 48,
  parameter int SRAM_AW = 20
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  // level-1 PE status and bus
  input  logic [N_PE-1:0]          pe_fired,
  input  logic [CW-1:0]            pe_count [N_PE],
  output logic [$clog2(N_PE+1)-1:0] fv_sel,
  output logic [FV_AW-1:0]         fv_addr,
  input  logic [IDX_W-1:0]         fv_data,
  // weight SRAM
  output logic                     sram_req,
  output logic [SRAM_AW-1:0]       sram_addr,
  input  logic                     sram_rvalid,
  input  logic [SRAM_W-1:0]        sram_rdata,
  // level-2 PE current writes
  output logic                     l2_we,
  output logic [$clog2(N2)-1:0]    l2_addr,
  output state_t                   l2_data
);

  localparam int WPI = N2 / WPW;           // SRAM words per level-1 index
  localparam int KW  = (WPI > 1) ? $clog2(WPI) : 1;
  localparam int PW  = $clog2(N_PE+1);

  typedef enum logic [2:0] {S_IDLE, S_SCAN, S_LOAD, S_FIRST, S_ISSUE, S_WAIT, S_WRITE} l2_state_e;
  l2_state_e state;

  logic [PW-1:0]      p;
  logic [CW-1:0]      e;
  logic [KW-1:0]      k;
  logic [KW-1:0]      rk;
  logic [IDX_W-1:0]   cur_idx;
  logic [15:0]        outstanding;
  logic [$clog2(N2)-1:0] j;
  state_t             acc [N2];

  assign busy     = (state != S_IDLE);
  assign fv_sel   = p;
  assign fv_addr  = (state == S_LOAD) ? '0 : FV_AW'(e + 1'b1);
  assign sram_req = (state == S_ISSUE);
  assign sram_addr = SRAM_AW'(cur_idx) * SRAM_AW'(WPI) + SRAM_AW'(k);
  assign l2_we    = (state == S_WRITE);
  assign l2_addr  = j;
  assign l2_data  = acc[j];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      p <= '0; e <= '0; k <= '0; j <= '0; cur_idx <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_SCAN;
          p <= '0;
        end
        S_SCAN: begin
          if (p == PW'(N_PE)) state <= S_WAIT;
          else if (pe_fired[p] && pe_count[p] != '0) begin
            state <= S_LOAD;
            e <= '0;
          end else p <= p + 1'b1;
        end
        S_LOAD:  state <= S_FIRST;
        S_FIRST: begin
          cur_idx <= fv_data;
          k <= '0;
          state <= S_ISSUE;
        end
        S_ISSUE: begin
          if (k == KW'(WPI - 1)) begin
            k <= '0;
            if (e + 1'b1 < pe_count[p]) begin
              cur_idx <= fv_data;
              e <= e + 1'b1;
            end else begin
              p <= p + 1'b1;
              state <= S_SCAN;
            end
          end else k <= k + 1'b1;
        end
        S_WAIT: if (outstanding == '0) begin
          state <= S_WRITE;
          j <= '0;
        end
        S_WRITE: begin
          j <= j + 1'b1;
          if (j == $clog2(N2)'(N2 - 1)) begin
            state <= S_IDLE;
            done <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // outstanding requests and in-order accumulation of returned weights
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      outstanding <= '0;
      rk <= '0;
      for (int n = 0; n < N2; n++) acc[n] <= '0;
    end else begin
      outstanding <= outstanding + 16'(sram_req) - 16'(sram_rvalid);
      if (state == S_IDLE && start) begin
        rk <= '0;
        for (int n = 0; n < N2; n++) acc[n] <= '0;
      end else if (sram_rvalid) begin
        rk <= (rk == KW'(WPI - 1)) ? '0 : rk + 1'b1;
        for (int q = 0; q < WPW; q++)
          acc[int'(rk) * WPW + q] <= acc[int'(rk) * WPW + q]
                                     + state_t'(signed'(sram_rdata[q*WW +: WW]));
      end
    end
  end

  a_wpi: assert property (@(posedge clk) WPI >= 2 && N2 % WPW == 0);
  a_no_stray_data: assert property (@(posedge clk) disable iff (!rst_n)
                                    sram_rvalid |-> outstanding != '0);

endmodule
