// neuron_alu -- arithmetic of one neuron processor: a parallel adder,
// complementers and a shifter, all combinational.
//
// Because the neuron states are +1 or -1, every product of the network is an
// identity or a complement, and because the number of neurons n is a power
// of two the division by n is a shift. Three results are formed from the
// accumulator v, the coefficient c at the memory head and the state bit
// sigma in the neuron's ring cell (1 = +1, 0 = -1):
//   acc_next = v + (sigma ? c : -c)                    potential update, eq. (1)
//   err_next = ((sigma ? +2^F : -2^F) - v) / n         learning increment, eq. (3)
//   c_next   = c + (sigma ? v : -v), saturated         coefficient update, eq. (3)
// In err_next the division truncates towards zero (complement, shift,
// complement back), so an error smaller than n LSBs gives a zero increment
// and the learning can be seen to stop. c_next saturates at the limits of a
// COEF_W-bit signed word. Rounding and saturation are this design's choices.
module neuron_alu #(
  parameter int unsigned ACC_W     = nn_pkg::NN_ACC_W,
  parameter int unsigned COEF_W    = nn_pkg::NN_COEF_W,
  parameter int unsigned COEF_FRAC = nn_pkg::NN_COEF_FRAC,
  parameter int unsigned SHIFT     = $clog2(nn_pkg::N_NEURONS)  // log2(n)
) (
  input  logic signed [ACC_W-1:0]  v,
  input  logic signed [COEF_W-1:0] c,
  input  logic                     sigma,
  output logic signed [ACC_W-1:0]  acc_next,
  output logic signed [ACC_W-1:0]  err_next,
  output logic signed [COEF_W-1:0] c_next
);

  localparam logic signed [ACC_W:0] ONE  = (ACC_W+1)'(1) <<< COEF_FRAC;
  localparam logic signed [ACC_W:0] CMAX = (ACC_W+1)'((1 << (COEF_W-1)) - 1);
  localparam logic signed [ACC_W:0] CMIN = -CMAX - (ACC_W+1)'(1);

  logic signed [ACC_W-1:0] c_ext;
  logic signed [ACC_W:0]   e, e_mag, q, csum;

  always_comb begin
    // potential: add or complement-and-add the coefficient
    c_ext    = ACC_W'(c);
    acc_next = sigma ? v + c_ext : v - c_ext;

    // learning increment: (sigma - v) / n, truncated towards zero
    e     = (sigma ? ONE : -ONE) - (ACC_W+1)'(v);
    e_mag = e[ACC_W] ? -e : e;
    q     = e_mag >>> SHIFT;
    err_next = ACC_W'(e[ACC_W] ? -q : q);

    // coefficient update with the increment held in v, saturated
    csum = (ACC_W+1)'(c) + (sigma ? (ACC_W+1)'(v) : -(ACC_W+1)'(v));
    if (csum > CMAX)      c_next = COEF_W'(CMAX);
    else if (csum < CMIN) c_next = COEF_W'(CMIN);
    else                  c_next = COEF_W'(csum);
  end

endmodule
