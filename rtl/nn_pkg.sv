// nn_pkg -- shared sizes, control-line bundle and command encoding of the
// digital Hopfield-type associative-memory chip.
//
// The network is a ring of N_NEURONS binary neurons (64, a power of two so that
// the division by n in the learning rule is a shift). Each neuron keeps N
// signed coefficients of NN_COEF_W = 9 bits including the sign, the precision
// that on-chip learning needs. Coefficients are fixed point with NN_COEF_FRAC
// fraction bits: integer C stands for C / 2**NN_COEF_FRAC, so the state values
// +1 / -1 are +/-2**NN_COEF_FRAC on the accumulator scale. The accumulator is
// NN_ACC_W = 16 bits wide, enough for the sum of N coefficients. The fixed-point
// scaling, the accumulator width and the command set are this design's own
// choices; the sizes N_NEURONS and NN_COEF_W follow the document.
//
// State bits are encoded 1 = +1, 0 = -1.
package nn_pkg;

  localparam int unsigned N_NEURONS = 64;  // neurons, ring length, words per memory
  localparam int unsigned NN_COEF_W    = 9;   // coefficient width, sign included
  localparam int unsigned NN_COEF_FRAC = 8;   // fraction bits of a coefficient
  localparam int unsigned NN_ACC_W     = 16;  // accumulator (potential) width

  // Control lines broadcast from the sequencer to every neuron processor.
  typedef struct packed {
    logic shift;    // advance the state ring and every synaptic memory by one
    logic acc;      // with shift: V <= V + (sigma ? C : -C)
    logic clr_v;    // V <= 0
    logic decide;   // sigma(t-1) <= sigma(t); sigma(t) <= sign(V)   (switch S1)
    logic err;      // V <= (sigma*2^F - V) / n                     (learning)
    logic upd;      // with shift: C <= C + (sigma ? V : -V)         (switch S2 = learn)
    logic clr_c;    // with shift: C <= 0 in every neuron
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '{default: 1'b0};

  // Host commands accepted by the sequencer.
  typedef enum logic [2:0] {
    CMD_EXCHANGE = 3'd0,  // one revolution through R: load new state, unload old
    CMD_RETRIEVE = 3'd1,  // synchronous updates until no neuron changes
    CMD_LEARN    = 3'd2,  // one learning step with the prototype held in R
    CMD_WRITE_C  = 3'd3,  // one revolution writing the selected neuron's coefficients
    CMD_CLEAR_C  = 3'd4,  // one revolution setting every coefficient to 0
    CMD_ROTATE   = 3'd5   // one revolution with no change (coefficient readout)
  } cmd_e;

endpackage
