// sequencer -- drives the control lines shared by all neuron processors.
//
// The host issues one command at a time (cmd with cmd_valid while
// cmd_ready = 1). A command is carried out as one or more revolutions of the
// state ring, each of N ring steps, with single-cycle steps in between:
//   CMD_EXCHANGE  1 revolution through R (switch S closed on R)      N cycles
//   CMD_RETRIEVE  repeated updates: N accumulate steps, 1 decision cycle,
//                 1 cycle that samples the convergence signal xi;
//                 stops when xi = 0 (no neuron changed: converged = 1) or
//                 after max_iter updates (converged = 0)        (N+2)/update
//   CMD_LEARN     the three revolutions of one learning step: load the
//                 prototype from R, accumulate the potential, (1 cycle:
//                 form the increment), update the coefficients;  3N+1 cycles
//                 changed = 1 if any neuron's increment was not zero
//   CMD_WRITE_C   1 revolution writing the selected neuron's words   N cycles
//   CMD_CLEAR_C   1 revolution setting every coefficient to 0        N cycles
//   CMD_ROTATE    1 revolution with no change, to read coefficients  N cycles
// step counts the ring steps of the current revolution. done pulses for one
// cycle when a command ends; converged, iterations and changed are held
// until the next command. A max_iter of 0 acts as 1.
// The three-revolution learning step follows the document; the command set,
// the extra decision and sampling cycles and the iteration limit are this
// design's own, since the document leaves the sequencer out.
module sequencer
  import nn_pkg::*;
#(
  parameter int unsigned N      = nn_pkg::N_NEURONS,
  parameter int unsigned ITER_W = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  cmd_e                 cmd,
  input  logic                 cmd_valid,
  output logic                 cmd_ready,
  input  logic [ITER_W-1:0]    max_iter,
  input  logic                 xi,          // some neuron changed state
  input  logic                 lam,         // some learning increment not zero
  output ctrl_t                ctrl,
  output logic                 r_connect,   // switch S
  output logic                 ext_wr,      // write the selected neuron's memory
  output logic [$clog2(N)-1:0] step,
  output logic                 busy,
  output logic                 done,
  output logic                 converged,
  output logic [ITER_W-1:0]    iterations,
  output logic                 changed
);

  typedef enum logic [2:0] {S_IDLE, S_REV, S_ERR, S_DEC, S_CHK} state_e;
  typedef enum logic [2:0] {PH_IO, PH_ACC, PH_UPD, PH_WR, PH_CLR, PH_ROT} phase_e;

  localparam logic [$clog2(N)-1:0] LAST = $clog2(N)'(N - 1);

  state_e state;
  phase_e phase;
  cmd_e   cur;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      phase      <= PH_IO;
      cur        <= CMD_EXCHANGE;
      step       <= '0;
      done       <= 1'b0;
      converged  <= 1'b0;
      iterations <= '0;
      changed    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          cur   <= cmd;
          step  <= '0;
          state <= S_REV;
          unique case (cmd)
            CMD_EXCHANGE: phase <= PH_IO;
            CMD_RETRIEVE: begin phase <= PH_ACC; iterations <= '0; converged <= 1'b0; end
            CMD_LEARN:    begin phase <= PH_IO; changed <= 1'b0; end
            CMD_WRITE_C:  phase <= PH_WR;
            CMD_CLEAR_C:  phase <= PH_CLR;
            default:      phase <= PH_ROT;
          endcase
        end
        S_REV: begin
          step <= step + 1'b1;
          if (phase == PH_UPD && step == '0) changed <= lam;
          if (step == LAST) begin
            step <= '0;
            if (phase == PH_IO && cur == CMD_LEARN) phase <= PH_ACC;
            else if (phase == PH_ACC)               state <= (cur == CMD_LEARN) ? S_ERR : S_DEC;
            else begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        end
        S_ERR: begin
          phase <= PH_UPD;
          state <= S_REV;
        end
        S_DEC: begin
          iterations <= iterations + 1'b1;
          state      <= S_CHK;
        end
        S_CHK: begin
          if (!xi) begin
            converged <= 1'b1;
            state     <= S_IDLE;
            done      <= 1'b1;
          end else if (iterations >= max_iter) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_REV;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    ctrl      = CTRL_IDLE;
    r_connect = 1'b0;
    ext_wr    = 1'b0;
    unique case (state)
      S_IDLE: ctrl.clr_v = 1'b1;
      S_REV: begin
        ctrl.shift = 1'b1;
        ctrl.acc   = (phase == PH_ACC);
        ctrl.upd   = (phase == PH_UPD);
        ctrl.clr_c = (phase == PH_CLR);
        ctrl.clr_v = (phase == PH_IO);
        r_connect  = (phase == PH_IO);
        ext_wr     = (phase == PH_WR);
      end
      S_ERR: ctrl.err = 1'b1;
      S_DEC: begin
        ctrl.decide = 1'b1;
        ctrl.clr_v  = 1'b1;
      end
      default: ;
    endcase
  end

  assign cmd_ready = (state == S_IDLE);
  assign busy      = (state != S_IDLE);

endmodule
