// neuron_processor -- one neuron of the ring network, with its own
// arithmetic, synaptic memory and a one-bit cell of the circular state ring.
//
// The only thing neurons exchange is one state bit: sigma_in comes from the
// previous neuron's cell and sigma_out (this cell, sigma(t)) goes to the next.
// On every ring step (ctrl.shift) the cell takes sigma_in, the synaptic
// memory advances by one word, and, in a potential revolution (ctrl.acc), the
// accumulator V adds or subtracts the coefficient at the memory head
// according to the state bit in the cell. After a full revolution V holds the
// potential v_i. ctrl.decide then loads the sign of V (its most significant
// bit, 1 = negative, so the new state bit is its complement) into the cell
// (switch S1) and copies the old state into sigma(t-1). The XOR of sigma(t)
// and sigma(t-1) tells whether this neuron changed; xi_out = xi_in OR that
// bit, so chaining the neurons gives the network's convergence signal.
//
// Learning (eq. 3): after a potential revolution with the prototype in the
// ring, ctrl.err replaces V by the increment (sigma_i - v_i)/n, sigma_i being
// the neuron's own prototype bit, back in its cell after the full
// revolution. In the next revolution ctrl.upd writes C + (sigma_j ? V : -V)
// back into the memory tail instead of the recirculated word (switch S2).
// lam_out = lam_in OR (V != 0) chains the "increment is not zero" tests.
// ctrl.clr_c writes zeros; ext_wr writes ext_wdata (coefficient loading).
//
// Timing: all state changes at the rising clock edge; xi_out, lam_out and
// c_head are combinational from registers. Synchronous active-low reset
// clears the cell, sigma(t-1) and V; coefficients are not reset.
// The structure follows the document's neuron diagram; the control encoding,
// the second OR chain for learning and the external write port are this
// design's own.
module neuron_processor
  import nn_pkg::*;
#(
  parameter int unsigned N         = nn_pkg::N_NEURONS,
  parameter int unsigned ACC_W     = nn_pkg::NN_ACC_W,
  parameter int unsigned COEF_W    = nn_pkg::NN_COEF_W,
  parameter int unsigned COEF_FRAC = nn_pkg::NN_COEF_FRAC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ctrl_t             ctrl,       // broadcast control lines
  input  logic              sigma_in,   // from the previous ring cell
  output logic              sigma_out,  // this ring cell, sigma(t)
  input  logic              xi_in,      // convergence chain in
  output logic              xi_out,     // convergence chain out
  input  logic              lam_in,     // learning-increment chain in
  output logic              lam_out,    // learning-increment chain out
  input  logic              ext_wr,     // with shift: write ext_wdata
  input  logic [COEF_W-1:0] ext_wdata,
  output logic [COEF_W-1:0] c_head      // coefficient at the memory head
);

  logic                     sigma_t, sigma_tm1;
  logic signed [ACC_W-1:0]  v;
  logic signed [ACC_W-1:0]  acc_next, err_next;
  logic signed [COEF_W-1:0] c_next;
  logic                     mem_wr;
  logic [COEF_W-1:0]        mem_wdata;

  neuron_alu #(
    .ACC_W(ACC_W), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC), .SHIFT($clog2(N))
  ) u_alu (
    .v(v), .c(c_head), .sigma(sigma_t),
    .acc_next(acc_next), .err_next(err_next), .c_next(c_next)
  );

  // switch S2: recirculate, learned update, clear or external word
  always_comb begin
    mem_wr    = ctrl.clr_c | ctrl.upd | ext_wr;
    if (ctrl.clr_c)     mem_wdata = '0;
    else if (ctrl.upd)  mem_wdata = c_next;
    else                mem_wdata = ext_wdata;
  end

  synaptic_memory #(.WORDS(N), .W(COEF_W)) u_mem (
    .clk(clk), .shift(ctrl.shift), .wr_en(mem_wr), .wdata(mem_wdata), .head(c_head)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sigma_t   <= 1'b0;
      sigma_tm1 <= 1'b0;
      v         <= '0;
    end else begin
      // state cell: ring shift, or switch S1 closing on a decision
      if (ctrl.shift)       sigma_t <= sigma_in;
      else if (ctrl.decide) sigma_t <= ~v[ACC_W-1];
      if (ctrl.decide)      sigma_tm1 <= sigma_t;
      // accumulator
      if (ctrl.clr_v)                  v <= '0;
      else if (ctrl.shift && ctrl.acc) v <= acc_next;
      else if (ctrl.err)               v <= err_next;
    end
  end

  assign sigma_out = sigma_t;
  assign xi_out    = xi_in | (sigma_t ^ sigma_tm1);
  assign lam_out   = lam_in | (v != '0);

  // a decision never coincides with a ring step
  assert property (@(posedge clk) disable iff (!rst_n) !(ctrl.shift && ctrl.decide));

endmodule
