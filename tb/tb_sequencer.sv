// tb_sequencer -- self-checking test of the control sequencer (N = 8).
// For every command the testbench counts, cycle by cycle, which control
// lines are active while the sequencer is busy and compares the counts and
// the total cycle count with the command's schedule: N cycles per
// revolution, 3N+1 cycles for a learning step (load, potential, increment,
// update) and N+2 cycles per update in retrieval. It drives the convergence
// input xi from the number of decisions seen, so that retrieval ends after a
// chosen number of updates, and checks the iteration limit as well.
module tb_sequencer;
  import nn_pkg::*;
  localparam int unsigned N = 8;

  logic       clk = 1'b0, rst_n;
  cmd_e       cmd;
  logic       cmd_valid, cmd_ready, xi, lam;
  logic [7:0] max_iter, iterations;
  ctrl_t      ctrl;
  logic       r_connect, ext_wr, busy, done, converged, changed;
  logic [2:0] step;
  int checks = 0, failures = 0;

  // per-command counters
  int c_busy, c_io, c_acc, c_upd, c_err, c_dec, c_clrc, c_wr, c_rot, c_bad;
  int xi_after;  // xi = 1 while fewer decisions than this have been made
  bit lam_drive;
  int step_err;

  sequencer #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign xi  = (c_dec < xi_after);
  // the increment chain is only meaningful after the increment cycle
  assign lam = lam_drive && (c_err > 0);

  always @(posedge clk) if (busy) begin
    c_busy++;
    if (ctrl.shift) begin
      if (step != 3'(c_io + c_acc + c_upd + c_clrc + c_wr + c_rot)) step_err++;
      if (r_connect) c_io++;
      else if (ctrl.acc) c_acc++;
      else if (ctrl.upd) c_upd++;
      else if (ctrl.clr_c) c_clrc++;
      else if (ext_wr) c_wr++;
      else c_rot++;
      if (ctrl.decide || ctrl.err) c_bad++;
    end
    if (ctrl.err) c_err++;
    if (ctrl.decide) c_dec++;
  end

  function automatic void expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d, expected %0d", what, got, want);
    end
  endfunction

  task automatic run(input cmd_e c);
    c_busy = 0; c_io = 0; c_acc = 0; c_upd = 0; c_err = 0; c_dec = 0;
    c_clrc = 0; c_wr = 0; c_rot = 0; c_bad = 0; step_err = 0;
    wait (cmd_ready);
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
    while (!done) @(negedge clk);
    expect_eq("no ring step with decide/err", c_bad, 0);
  endtask

  initial begin
    rst_n = 0; cmd = CMD_EXCHANGE; cmd_valid = 0; max_iter = 8'd50; xi_after = 0; lam_drive = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    run(CMD_EXCHANGE);
    expect_eq("exchange cycles", c_busy, N);
    expect_eq("exchange R steps", c_io, N);

    run(CMD_ROTATE);
    expect_eq("rotate cycles", c_busy, N);
    expect_eq("rotate steps", c_rot, N);

    run(CMD_CLEAR_C);
    expect_eq("clear cycles", c_busy, N);
    expect_eq("clear steps", c_clrc, N);

    run(CMD_WRITE_C);
    expect_eq("write cycles", c_busy, N);
    expect_eq("write steps", c_wr, N);
    expect_eq("write step order", step_err, 0);

    for (int l = 0; l < 2; l++) begin
      lam_drive = (l == 0);
      run(CMD_LEARN);
      expect_eq("learn cycles", c_busy, 3 * N + 1);
      expect_eq("learn load steps", c_io, N);
      expect_eq("learn potential steps", c_acc, N);
      expect_eq("learn increment cycles", c_err, 1);
      expect_eq("learn update steps", c_upd, N);
      expect_eq("learn changed", int'(changed), int'(lam_drive));
    end

    for (int k = 1; k <= 4; k++) begin
      xi_after = k;
      run(CMD_RETRIEVE);
      expect_eq("retrieve iterations", int'(iterations), k);
      expect_eq("retrieve converged", int'(converged), 1);
      expect_eq("retrieve cycles", c_busy, k * (N + 2));
      expect_eq("retrieve potential steps", c_acc, k * N);
      expect_eq("retrieve decisions", c_dec, k);
    end

    // iteration limit
    max_iter = 8'd3; xi_after = 100;
    run(CMD_RETRIEVE);
    expect_eq("limited iterations", int'(iterations), 3);
    expect_eq("limited not converged", int'(converged), 0);
    expect_eq("limited cycles", c_busy, 3 * (N + 2));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
