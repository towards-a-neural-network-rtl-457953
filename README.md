# A ring-connected digital Hopfield network with on-chip learning

This is an associative memory. It is a fully connected feedback network of
binary neurons (states +1 / -1). Every neuron updates with the rule

    sigma_i <- sign( sum_j C_ij * sigma_j )

and the network learns its own synaptic matrix C on chip. Learning uses the
iterative projection rule

    C_ij <- C_ij + (1/n) * (sigma_i - v_i) * sigma_j,   v_i = sum_j C_ij * sigma_j

applied to each stored prototype in turn, starting from C = 0. This rule
converges towards the orthogonal projection onto the prototypes. Each
prototype then becomes an attractor, even when prototypes are correlated.

The architecture trades speed for wiring. A fully parallel network needs an
adder tree for every neuron. Here each neuron has one adder and computes its
potential in n sequential steps. The network state sits in an n x 1 bit
circular shift register, one cell per neuron. At each step the whole ring
moves by one place, so every neuron sees a different neuron's state bit. The
neuron adds or subtracts the matching coefficient, read from its own
shift-register memory. Neurons pass each other only one bit. The learning
rule needs only the neuron's own potential and the passing state bits, so
learning costs little extra hardware.

The RTL follows the architecture of the paper *Towards a Neural Network Chip:
A Performance Assessment and a Simple Example*. That paper proposes 64 neuron
processors, each holding 64 coefficients of 9 bits (sign included). It gives
the block structure of a neuron but leaves out the sequencer and all control
signals. Everything in the control path here is this implementation's own
design.

## The ring and its timing

`nn_chip` builds a ring of N `neuron_processor`s (N = 64 by default; it must
be a power of two). Neuron i takes its ring input from neuron i-1. Neuron 0
takes it from the I/O register R, or from neuron N-1 when R is switched out.

A **revolution** is N cycles with `ctrl.shift = 1`. In step t (t = 0..N-1):

* the ring cell of neuron i holds the state of neuron (i - t) mod N, and
* the head of neuron i's coefficient memory holds C[i][(i - t) mod N].

The memories therefore advance in lock-step with the ring. Each memory is a
circular shift register (`synaptic_memory`), not a RAM. After a revolution,
every ring cell and every memory is back at its starting position. Nothing in
a neuron ever uses an address. The matrix is stored "skewed": word t of
neuron i belongs to column (i - t) mod N. The top-level port `coef_col`
reports that column for the neuron chosen with `coef_sel`.

One **synchronous update** has three parts:

1. A revolution with `ctrl.acc`. Each neuron's accumulator V gains `+C` or
   `-C`, depending on the state bit in its cell. At the end, V holds the
   potential v_i.
2. One decision cycle (`ctrl.decide`). The complement of V's sign bit is the
   new state: V >= 0 gives +1. It is loaded into the ring cell (switch S1 of
   the neuron). The old state moves into `sigma(t-1)`, and V is cleared.
3. One cycle in which the sequencer samples `xi`. Each neuron computes
   `sigma(t) XOR sigma(t-1)`, and a chain of ORs through all neurons
   (`xi_in`/`xi_out`) combines these bits. `xi = 0` means no neuron changed,
   so the state is a fixed point.

An update therefore takes N+2 cycles: 66 at N = 64, or 3.3 us at a 20 MHz
clock. Retrieval repeats updates until `xi = 0` or until `max_iter` updates
have run. In the 64-neuron tests, start states a few bits away from a learned
prototype converged in 2 or 3 updates, 132 to 198 cycles.

## Number format and arithmetic (`neuron_alu`)

* State bit 1 means +1 and 0 means -1.
* A coefficient is a 9-bit two's-complement number with 8 fraction bits, so
  its range is [-1, 255/256]. On the accumulator's scale, a state of +/-1 is
  therefore +/-256.
* The accumulator is 16 bits wide. Its worst-case magnitude is 64 x 256 =
  16384, so it never overflows at N = 64.
* Every product is a state of +/-1 times a number. Each is therefore an
  identity or a complement, and the ALU needs one adder.
* n is a power of two, so the division by n is an arithmetic shift by
  log2(N). The division truncates towards zero: take the magnitude, shift it,
  then restore the sign. An error smaller than n LSBs therefore gives a zero
  increment, which lets the chip detect that learning has stopped. Rounding
  towards minus infinity would leave increments of -1 forever.
* A learned coefficient saturates at -256 or +255 rather than wrapping.

The fixed-point scale, the accumulator width, the rounding and the saturation
are choices of this implementation. The source gives only the 9-bit
coefficient width. It reports that 9 bits are needed when learning runs at
limited precision, and 6 bits when weights are computed off-line and then
truncated.

## On-chip learning: three revolutions per prototype

`CMD_LEARN` presents the prototype that the host has placed in R. It takes
3N+1 cycles:

| phase | cycles | what happens |
|---|---|---|
| load | N | R is switched into the ring, and the prototype shifts in. V is held at 0. |
| potential | N | same as an update's accumulate revolution: V = v_i |
| increment | 1 | `ctrl.err`: V <- (256*sigma_i - V) / N. After a full revolution the neuron's own prototype bit sigma_i is back in its cell. |
| update | N | `ctrl.upd`: each word leaving the memory head is rewritten as `C + V` or `C - V`, following the state bit passing the cell (switch S2 selects "learn"). |

Each neuron also tests its increment V for non-zero. A second OR chain
(`lam_in`/`lam_out`) combines these tests, and the sequencer stores the
result as `changed`. The host repeats epochs over all prototypes until a
whole epoch has `changed = 0`. The memories are cleared first with
`CMD_CLEAR_C`, because learning starts from C = 0.

With 64 neurons and 16 random prototypes (load ratio 0.25), learning
converged in 8 epochs in simulation. Every prototype was then recalled from
start states with 2 or 4 flipped bits. The recall workload
(`tb_nn_chip_recall`) starts further away, with 4 trials per prototype:

| start distance | reached the prototype |
|---|---|
| 8 of 64 bits (h = 0.125) | 62 of 64 retrievals |
| 16 of 64 bits (h = 0.25) | 42 of 64 retrievals |

The slowest of these retrievals took 13 updates.

## How many coefficient bits are enough

The testbenches measure this for the default network: 64 neurons, 16 random
prototypes, start states 8 bits (h = 0.125) or 16 bits (h = 0.25) away from
a prototype. The tables give the fraction of retrievals that end exactly on
the prototype.

Learning on chip (`tb_nn_chip_recall`, `tb_nn_chip_recall7`):

| coefficient bits | 8 bits away | 16 bits away |
|---|---|---|
| 9 (default) | 62 / 64 | 42 / 64 |
| 7 | 2 / 64 | 0 / 64 |

With 7 bits, the increment (sigma_i - v_i)/64 truncates to zero as soon as
every error is below 1.0. Learning then stops far from the projection
matrix. With this arithmetic, nine bits work well and seven do not. Eight
bits were not tried.

Weights learned off-line in floating point (`tb_nn_chip_offline`). The
matrix is divided by its largest entry, truncated to m bits and written in:

| m | 8 bits away | 16 bits away |
|---|---|---|
| 4 | 23 / 32 | 9 / 32 |
| 6 | 31 / 32 | 17 / 32 |
| 9 | 32 / 32 | 16 / 32 |

Six bits are about as good as full precision for weights computed off-line.
Learning on chip needs more bits, because rounding errors accumulate over
the iterations.

## Loading and unloading: register R

`io_register` is the serial-parallel register R together with the ring
switch S. During `CMD_EXCHANGE` (N cycles), R sits in the ring. Its top bit
feeds neuron 0, and the bit leaving neuron N-1 enters R's bottom bit. After
one revolution:

* neuron i holds the old `R[i]`, and
* `R[i]` holds neuron i's old state.

One command therefore both loads a start state and unloads the previous
state. In all other commands R is switched out and holds its value. A typical
recall runs like this:

    io_load with the start state  ->  CMD_EXCHANGE
    CMD_RETRIEVE (read converged, iterations)
    CMD_EXCHANGE                  ->  io_dout holds the result

## Coefficient transfer

Weights learned off-line can be written into the chip, and learned weights
can be read back. This uses one revolution per neuron:

* `CMD_WRITE_C`: in every cycle, drive `coef_wdata` with
  `C[coef_sel][coef_col]`. It may be driven combinationally from `coef_col`.
* `CMD_ROTATE`: in every cycle, `coef_rdata` is `C[coef_sel][coef_col]`.

The whole matrix takes N revolutions, or N^2 cycles. This port is this
implementation's own addition.

## Commands (`sequencer`)

A command is accepted in a cycle where `cmd_valid` and `cmd_ready` are both
1. `done` pulses for one cycle at the end. The outputs `converged`,
`iterations` and `changed` hold their values until the next command.

| command | cycles | effect |
|---|---|---|
| `CMD_EXCHANGE` | N | swap R and the network state |
| `CMD_RETRIEVE` | k(N+2) | k synchronous updates, up to `max_iter` (0 acts as 1) |
| `CMD_LEARN` | 3N+1 | one learning step with the prototype in R |
| `CMD_WRITE_C` | N | write neuron `coef_sel`'s coefficients |
| `CMD_CLEAR_C` | N | set every coefficient to 0 |
| `CMD_ROTATE` | N | no change; used to read coefficients |

The control lines that the sequencer broadcasts to all neurons form one
packed struct, `nn_pkg::ctrl_t`: `shift`, `acc`, `clr_v`, `decide`, `err`,
`upd` and `clr_c`. A ring step never coincides with a decision, and an
assertion in `neuron_processor` checks this.

## Files

| file | contents |
|---|---|
| `rtl/nn_pkg.sv` | sizes, control-line struct, command enum |
| `rtl/synaptic_memory.sv` | circular shift-register coefficient memory |
| `rtl/neuron_alu.sv` | adder, complementers, shifter, saturation |
| `rtl/neuron_processor.sv` | one neuron: ring cell, sigma(t-1), accumulator, memory, OR-chain taps |
| `rtl/io_register.sv` | register R and switch S |
| `rtl/sequencer.sv` | command FSM driving the control lines |
| `rtl/nn_chip.sv` | top: ring of neurons, R, sequencer |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_nn_chip.sv` | end-to-end at N = 16 (the size of the paper's tentative layout) |
| `tb/tb_nn_chip_full.sv` | end-to-end at the default size, N = 64 with 16 prototypes |
| `tb/tb_nn_chip_recall.sv` | recall workload: N = 64, 16 prototypes, start states 8 and 16 bits away |
| `tb/tb_nn_chip_recall7.sv` | the same with 7-bit coefficients (`COEF_W = 7`, `COEF_FRAC = 6`) |
| `tb/tb_nn_chip_offline.sv` | off-line learned weights truncated to 4, 6 and 9 bits, written in and recalled |

The top's parameters are `N`, `ACC_W`, `COEF_W`, `COEF_FRAC` and `ITER_W`.
`N` must be a power of two. `ACC_W` must hold N x 2^(COEF_W-1).

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and exits. Build and
run with Verilator 5, with the package listed first:

    verilator --binary --timing --assert rtl/nn_pkg.sv rtl/synaptic_memory.sv \
        rtl/neuron_alu.sv rtl/neuron_processor.sv rtl/io_register.sv \
        rtl/sequencer.sv rtl/nn_chip.sv tb/tb_nn_chip_full.sv \
        --top-module tb_nn_chip_full -Mdir obj
    obj/Vtb_nn_chip_full

The end-to-end testbenches hold an independent integer reference model of
the learning rule and the synchronous update. They check the following:

* the complete coefficient matrix after every learning epoch;
* the `changed` flag of every learning step;
* the final state, iteration count and convergence flag of every retrieval;
* the cycle count of every command.

They also fail if one of these mechanisms never happens: exchange, non-zero
learning step, converged learning, converged retrieval, a retrieval stopped
by the iteration limit, a state change, a coefficient write, or a clear. The
full-size run takes well under a second.

## Departures and limits

* **Own control design.** The sequencer, the command set, the handshake, the
  decision and sampling cycles (N+2 rather than N cycles per update) and the
  iteration limit are this implementation's choices.
* **Own arithmetic details.** The fixed-point scale, the 16-bit accumulator,
  truncation towards zero in the division, and coefficient saturation are
  also this implementation's choices.
* **Learning-convergence chain.** It is a second OR chain next to the `xi`
  chain. The source says only that the local zero tests are ORed together.
* **Tie rule.** A potential of exactly 0 gives state +1, because the sign bit
  is 0.
* **Switch S.** The drawing shows a grounded input on switch S. It is not
  modelled. R is either in the ring or bypassed.
* **Not built.** The following are not built: the clock generator (supply a
  clock of about 20 MHz), pads, and test structures. The two extensions the
  source lists as future work are also not built: cascading chips by
  splitting the state ring across them, and a feed-forward classifier
  variant.
* **Reset.** Coefficients are not reset. Issue `CMD_CLEAR_C` after reset.
