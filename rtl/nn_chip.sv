// nn_chip -- fully connected feedback (Hopfield-type) neural network of N
// binary neurons with on-chip learning, built as a ring of neuron processors.
//
// Each neuron computes its potential v_i = sum_j C_ij sigma_j with a single
// adder in N sequential steps. The network state circulates in an N x 1 bit
// circular shift register, one cell per neuron, so at every ring step each
// neuron sees one other neuron's state and adds or subtracts the matching
// coefficient from its own shift-register memory. After one revolution all
// neurons decide at once (synchronous update, sigma <- sign(C sigma)). The
// convergence signal xi is the OR over neurons of "my state changed".
// Learning uses the projection rule C_ij += (1/n)(sigma_i - v_i) sigma_j,
// starting from C = 0, three revolutions per prototype presentation.
// The I/O register R, switched into the ring, loads and unloads states.
//
// Host interface: commands (see sequencer) with cmd_valid / cmd_ready and a
// one-cycle done pulse. State I/O: load R with io_load/io_din, issue
// CMD_EXCHANGE, read the previous state from io_dout. Coefficients of neuron
// coef_sel are written with CMD_WRITE_C and read with CMD_ROTATE, one per
// cycle: in each cycle of the revolution coef_rdata is C[coef_sel][coef_col]
// and coef_wdata must be C[coef_sel][coef_col]. State bit 1 = +1, 0 = -1.
// Coefficients are 9-bit two's complement with 8 fraction bits.
//
// The ring of 64 neuron processors, the 64 x 9-bit memories, the one-bit
// neighbour links and the OR-chained convergence signal follow the document;
// the command set and the coefficient port are this design's own.
module nn_chip
  import nn_pkg::*;
#(
  parameter int unsigned N         = nn_pkg::N_NEURONS,
  parameter int unsigned ACC_W     = nn_pkg::NN_ACC_W,
  parameter int unsigned COEF_W    = nn_pkg::NN_COEF_W,
  parameter int unsigned COEF_FRAC = nn_pkg::NN_COEF_FRAC,
  parameter int unsigned ITER_W    = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // commands
  input  cmd_e                 cmd,
  input  logic                 cmd_valid,
  output logic                 cmd_ready,
  input  logic [ITER_W-1:0]    max_iter,
  output logic                 busy,
  output logic                 done,
  output logic                 converged,
  output logic [ITER_W-1:0]    iterations,
  output logic                 changed,
  output logic                 xi,
  // state I/O through R
  input  logic                 io_load,
  input  logic [N-1:0]         io_din,
  output logic [N-1:0]         io_dout,
  // coefficient transfer
  input  logic [$clog2(N)-1:0] coef_sel,
  output logic [$clog2(N)-1:0] coef_col,
  input  logic [COEF_W-1:0]    coef_wdata,
  output logic [COEF_W-1:0]    coef_rdata
);

  ctrl_t                ctrl;
  logic                 r_connect, ext_wr, ring_in;
  logic [$clog2(N)-1:0] step;
  logic [N-1:0]         sigma, xi_c, lam_c;
  logic [COEF_W-1:0]    heads [N];

  sequencer #(.N(N), .ITER_W(ITER_W)) u_seq (
    .clk(clk), .rst_n(rst_n), .cmd(cmd), .cmd_valid(cmd_valid), .cmd_ready(cmd_ready),
    .max_iter(max_iter), .xi(xi_c[N-1]), .lam(lam_c[N-1]), .ctrl(ctrl),
    .r_connect(r_connect), .ext_wr(ext_wr), .step(step), .busy(busy), .done(done),
    .converged(converged), .iterations(iterations), .changed(changed)
  );

  io_register #(.N(N)) u_r (
    .clk(clk), .rst_n(rst_n), .load(io_load), .din(io_din), .dout(io_dout),
    .connect(r_connect), .shift(ctrl.shift), .ring_ret(sigma[N-1]), .ring_in(ring_in)
  );

  for (genvar i = 0; i < N; i++) begin : g_neuron
    neuron_processor #(
      .N(N), .ACC_W(ACC_W), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC)
    ) u_np (
      .clk(clk), .rst_n(rst_n), .ctrl(ctrl),
      .sigma_in (i == 0 ? ring_in : sigma[(i+N-1)%N]),
      .sigma_out(sigma[i]),
      .xi_in    (i == 0 ? 1'b0 : xi_c[(i+N-1)%N]),
      .xi_out   (xi_c[i]),
      .lam_in   (i == 0 ? 1'b0 : lam_c[(i+N-1)%N]),
      .lam_out  (lam_c[i]),
      .ext_wr   (ext_wr && coef_sel == $clog2(N)'(i)),
      .ext_wdata(coef_wdata),
      .c_head   (heads[i])
    );
  end

  assign xi         = xi_c[N-1];
  assign coef_rdata = heads[coef_sel];
  assign coef_col   = coef_sel - step;   // modulo N

endmodule
