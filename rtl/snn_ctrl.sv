// snn_ctrl: controller of the SNN character recogniser.
//
// A state machine that runs the recognition loop:
//   (a) wait for start from the host, then initialise every neuron;
//   (b) sweep all level-1 and level-2 neurons once (all PEs in parallel);
//   (c) if the level-2 PE's fired flag is set, a character is recognised:
//       latch the index of the first level-2 neuron that fired and finish (g);
//   (d,e) otherwise let the L2 current module scan the level-1 firing vectors
//       and compute the level-2 input currents for the next cycle;
//   (f) increment the simulation cycle count and go back to (b) while it is
//       below MAX_CYCLES, else finish without a recognition.
// On finishing it raises 'finished' (held until the next start) and reports
// the class index, whether a neuron fired, and the cycle count.
// The states, the 12-cycle limit and the reported results follow the source
// design. Starting the current computation every cycle, even when no level-1
// neuron fired (it then writes zero currents), is this design's choice; it
// keeps I(j) equal to the sum over the latest firing vector as the model
// requires.
module snn_ctrl #(
  parameter int MAX_CYCLES = 12,
  parameter int CLS_W      = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  // PE control
  output logic             pe_init,
  output logic             pe_run,
  input  logic             pe_busy,
  input  logic             l2_fired,
  input  logic [CLS_W-1:0] l2_first_idx,
  // L2 current module
  output logic             cur_start,
  input  logic             cur_busy,
  // results
  output logic             finished,
  output logic             recognized,
  output logic [CLS_W-1:0] class_idx,
  output logic [7:0]       cycle_count
);

  typedef enum logic [2:0] {
    S_IDLE, S_INIT, S_PROC, S_PROC_WAIT, S_EXAM_L2, S_WEIGHTS, S_WEIGHTS_WAIT, S_NEXT
  } ctrl_state_e;
  ctrl_state_e state;

  assign pe_init   = (state == S_IDLE) && start;
  assign pe_run    = (state == S_PROC);
  assign cur_start = (state == S_WEIGHTS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      finished    <= 1'b0;
      recognized  <= 1'b0;
      class_idx   <= '0;
      cycle_count <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state       <= S_INIT;
          finished    <= 1'b0;
          recognized  <= 1'b0;
          class_idx   <= '0;
          cycle_count <= '0;
        end
        S_INIT:      if (!pe_busy) state <= S_PROC;
        S_PROC:      state <= S_PROC_WAIT;
        S_PROC_WAIT: if (!pe_busy) state <= S_EXAM_L2;
        S_EXAM_L2: begin
          if (l2_fired) begin
            recognized <= 1'b1;
            class_idx  <= l2_first_idx;
            finished   <= 1'b1;
            state      <= S_IDLE;
          end else state <= S_WEIGHTS;
        end
        S_WEIGHTS:      state <= S_WEIGHTS_WAIT;
        S_WEIGHTS_WAIT: if (!cur_busy) state <= S_NEXT;
        S_NEXT: begin
          cycle_count <= cycle_count + 1'b1;
          if (int'(cycle_count) + 1 < MAX_CYCLES) state <= S_PROC;
          else begin
            finished <= 1'b1;
            state    <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
