// synaptic_memory -- the coefficient store C(i) of one neuron processor.
//
// The memory is only ever read in order, once per state-ring step, in the
// same order in learning and in retrieval, so it is built as a circular shift
// register of WORDS words instead of an addressed RAM. The word at the head
// (head) is the coefficient that belongs to the state bit currently sitting
// in this neuron's ring cell. On every cycle with shift = 1 all words move one
// place towards the head and the tail receives either the old head
// (recirculate) or wdata when wr_en = 1 (rewrite). After WORDS shifts every
// word is back at its starting place. Nothing happens when shift = 0.
//
// Timing: head is a register output; a write takes effect at the clock edge
// and the written word reappears at the head WORDS shifts later.
// The shift-register organisation and the 64 x 9-bit size follow the
// document; the write port at the tail is this design's choice. There is no
// reset: the coefficients are cleared by a clear revolution.
module synaptic_memory #(
  parameter int unsigned WORDS = nn_pkg::N_NEURONS,
  parameter int unsigned W     = nn_pkg::NN_COEF_W
) (
  input  logic         clk,
  input  logic         shift,   // advance by one word
  input  logic         wr_en,   // with shift: tail takes wdata instead of head
  input  logic [W-1:0] wdata,
  output logic [W-1:0] head     // current coefficient
);

  logic [W-1:0] mem [WORDS];

  assign head = mem[0];

  always_ff @(posedge clk) begin
    if (shift) begin
      for (int unsigned k = 0; k + 1 < WORDS; k++) mem[k] <= mem[k+1];
      mem[WORDS-1] <= wr_en ? wdata : mem[0];
    end
  end

endmodule
