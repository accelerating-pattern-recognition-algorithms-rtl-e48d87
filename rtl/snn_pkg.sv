// snn_pkg: shared fixed-point types and constants of the Izhikevich spiking
// neural network (SNN) character recogniser.
//
// All neuron quantities use two's-complement fixed point with 12 fractional
// bits (Q.12), the smallest fraction width that still recognises characters
// correctly. Stored neuron state (V, u, I) is 32 bits wide; intermediate
// products inside the processing element use 48 bits so that up to 32 integer
// bits plus 12 fractional bits are kept. Synaptic weights are 16-bit Q4.12 and
// four of them are packed into one 64-bit off-chip SRAM word.
//
// The model constants come from the Izhikevich excitatory and inhibitory
// neuron parameter sets (a, b, c, d) with a 1 ms time step, rounded to Q.12.
// Which set a level uses, the initial state (V = -65 mV, u = b*V) and the
// level-1 input current for an "on" pixel are this design's own choices.
package snn_pkg;

  localparam int FRAC = 12;                     // fractional bits
  localparam int SW   = 32;                     // stored state width
  localparam int DW   = 48;                     // datapath width
  localparam int WW   = 16;                     // weight width (Q4.12)
  localparam int SRAM_W = 64;                   // SRAM word width
  localparam int WPW  = SRAM_W / WW;            // weights per SRAM word (4)

  typedef logic signed [SW-1:0] state_t;
  typedef logic signed [DW-1:0] wide_t;
  typedef logic signed [WW-1:0] weight_t;

  // Q.12 helper
  function automatic state_t q12(input int v);
    return state_t'(v) <<< FRAC;
  endfunction

  // Izhikevich parameter set in Q.12
  typedef struct packed {
    logic signed [15:0] a;
    logic signed [15:0] b;
    state_t             c;
    state_t             d;
  } izh_param_t;

  // excitatory: a=0.02 b=0.2 c=-55 d=4
  localparam izh_param_t EXCIT = '{a: 16'sd82,  b: 16'sd819, c: -32'sd225280, d: 32'sd16384};
  // inhibitory: a=0.06 b=0.22 c=-65 d=2
  localparam izh_param_t INHIB = '{a: 16'sd246, b: 16'sd901, c: -32'sd266240, d: 32'sd8192};

  localparam logic signed [15:0] K_004  = 16'sd164;        // 0.04 in Q.12
  localparam state_t             K_140  = 32'sd573440;     // 140 in Q.12
  localparam state_t             V_TH   = 32'sd122880;     // 30 mV firing threshold
  localparam state_t             V_INIT = -32'sd266240;    // -65 mV initial potential
  localparam state_t             I_ON   = 32'sd81920;      // 20.0: level-1 current for an "on" pixel

  localparam int PIPE_DEPTH = 23;                          // PE pipeline stages

endpackage
