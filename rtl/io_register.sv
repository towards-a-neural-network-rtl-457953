// io_register -- the serial-parallel I/O register R and the ring switch S.
//
// R is an N-bit register the host loads and reads in parallel. With
// connect = 1 (switch S puts R into the state ring) each ring step shifts R
// by one place: its top bit r[N-1] feeds the first ring cell and the bit
// leaving the last ring cell (ring_ret) enters r[0]. After N steps the ring
// cell of neuron i holds the old r[i] and r[i] holds the old state of neuron
// i, so one revolution loads a new network state and unloads the previous one
// at the same time. With connect = 0 R is bypassed and holds its value; the
// ring is closed on itself (ring_in = ring_ret), as during learning and
// retrieval.
//
// Timing: load and shift act at the rising clock edge, load only when no
// shift takes place; ring_in is combinational. Synchronous active-low reset
// clears R. The bit ordering and the combined load/unload revolution are this
// design's own choices; R and S are the document's.
module io_register #(
  parameter int unsigned N = nn_pkg::N_NEURONS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,      // parallel load from din
  input  logic [N-1:0] din,
  output logic [N-1:0] dout,      // parallel read of R
  input  logic         connect,   // switch S: 1 = R in the ring
  input  logic         shift,     // ring step
  input  logic         ring_ret,  // from the last ring cell
  output logic         ring_in    // to the first ring cell
);

  logic [N-1:0] r;

  always_ff @(posedge clk) begin
    if (!rst_n)                r <= '0;
    else if (shift && connect) r <= {r[N-2:0], ring_ret};
    else if (load && !shift)   r <= din;
  end

  assign ring_in = connect ? r[N-1] : ring_ret;
  assign dout    = r;

endmodule
