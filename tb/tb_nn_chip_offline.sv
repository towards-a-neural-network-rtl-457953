// tb_nn_chip_offline -- off-line learning workload at the default size:
// 64 neurons, 16 random prototypes (p/n = 0.25, each bit +1 with
// probability 0.5).
//
// The testbench computes the projection matrix in floating point with the
// same iterative rule the chip uses (C(0) = 0, C_ij += (1/n)(s_i - v_i) s_j,
// repeated until the largest change is below 1e-9). It divides the matrix by
// its largest magnitude (retrieval depends only on signs of potentials, so
// the scale is free), truncates each entry towards zero to m bits including
// the sign (m = 4, 6 and 9; m-1 fraction bits, clamped to the m-bit range)
// and writes the words, scaled to the chip's 9-bit format, into the chip
// with CMD_WRITE_C. It reads the matrix
// back, then retrieves every prototype from start states 8 and 16 bits away
// (h_i = 0.125 and 0.25). Every retrieval's final state, iteration count and
// convergence flag is compared with an integer reference model of the
// synchronous update. The fraction of retrievals that end on the prototype
// is printed for each m.
module tb_nn_chip_offline;
  import nn_pkg::*;
  localparam int unsigned N      = nn_pkg::N_NEURONS;
  localparam int unsigned P      = 16;
  localparam int unsigned TRIALS = 2;   // retrievals per prototype and distance
  localparam int unsigned LW     = $clog2(N);

  logic          clk = 1'b0, rst_n;
  cmd_e          cmd;
  logic          cmd_valid, cmd_ready, busy, done, converged, changed, xi, io_load;
  logic [7:0]    max_iter, iterations;
  logic [N-1:0]  io_din, io_dout;
  logic [LW-1:0] coef_sel, coef_col;
  logic [8:0]    coef_wdata, coef_rdata;

  int checks = 0, failures = 0;
  real cf  [N][N];        // floating-point projection matrix
  int  cref[N][N];        // integer matrix held by the chip (9-bit scale)
  int  rd  [N][N];
  logic [N-1:0] protos [P];
  int cycles;
  int m_write = 0, m_conv = 0, m_hit = 0;

  nn_chip dut (.*);

  always #5 clk = ~clk;

  assign coef_wdata = 9'(cref[coef_sel][coef_col]);

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d, expected %0d", what, got, want);
    end
  endfunction

  function automatic int sv(logic [N-1:0] s, int j);
    return s[j] ? 1 : -1;
  endfunction

  task automatic ref_retrieve(input logic [N-1:0] s0, input int lim,
                              output logic [N-1:0] s, output int iters, output bit conv);
    logic [N-1:0] nx;
    s = s0; iters = 0; conv = 0;
    forever begin
      for (int i = 0; i < N; i++) begin
        int v;
        v = 0;
        for (int j = 0; j < N; j++) v += cref[i][j] * sv(s, j);
        nx[i] = (v >= 0);
      end
      iters++;
      if (nx == s) begin conv = 1; break; end
      s = nx;
      if (iters >= lim) break;
    end
  endtask

  task automatic run(input cmd_e c);
    wait (cmd_ready);
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); if (!done) cycles++; end
  endtask

  task automatic exchange(input logic [N-1:0] in_s, output logic [N-1:0] out_s);
    @(negedge clk);
    io_din = in_s; io_load = 1;
    @(negedge clk);
    io_load = 0;
    run(CMD_EXCHANGE);
    out_s = io_dout;
  endtask

  task automatic write_and_check();
    int bad;
    for (int i = 0; i < N; i++) begin
      coef_sel = LW'(i);
      run(CMD_WRITE_C);
      m_write++;
    end
    for (int i = 0; i < N; i++) begin
      coef_sel = LW'(i);
      wait (cmd_ready);
      @(negedge clk);
      cmd = CMD_ROTATE; cmd_valid = 1;
      @(negedge clk);
      cmd_valid = 0;
      while (!done) begin
        rd[i][coef_col] = int'(signed'(coef_rdata));
        @(negedge clk);
      end
    end
    bad = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) if (rd[i][j] != cref[i][j]) bad++;
    expect_eq("matrix words read back wrong", bad, 0);
  endtask

  initial begin
    logic [N-1:0] s, got, want, dummy, flipped;
    int iters, hits, total, pos, q, lim, maxq;
    bit conv;
    real v, d, dmax, cmax;
    rst_n = 0; cmd = CMD_ROTATE; cmd_valid = 0; io_load = 0; io_din = '0;
    max_iter = 8'd30; coef_sel = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // floating-point learning
    for (int k = 0; k < P; k++) protos[k] = N'({$urandom, $urandom});
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) cf[i][j] = 0.0;
    for (int e = 0; e < 500; e++) begin
      dmax = 0.0;
      for (int k = 0; k < P; k++)
        for (int i = 0; i < N; i++) begin
          v = 0.0;
          for (int j = 0; j < N; j++) v += cf[i][j] * sv(protos[k], j);
          d = (sv(protos[k], i) - v) / N;
          if (d > dmax) dmax = d;
          if (-d > dmax) dmax = -d;
          for (int j = 0; j < N; j++) cf[i][j] += d * sv(protos[k], j);
        end
      if (dmax < 1e-9) break;
    end
    checks++;
    if (dmax >= 1e-6) begin failures++; $display("FAIL floating-point learning did not converge"); end

    cmax = 0.0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        if (cf[i][j] > cmax) cmax = cf[i][j];
        if (-cf[i][j] > cmax) cmax = -cf[i][j];
      end

    foreach (lim_m[mi]) begin
      int m;
      m = lim_m[mi];
      maxq = (1 << (m - 1)) - 1;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          q = $rtoi(cf[i][j] / cmax * (1 << (m - 1)));      // truncation towards zero
          if (q > maxq) q = maxq;
          if (q < -maxq - 1) q = -maxq - 1;
          cref[i][j] = q * (1 << (9 - m));
        end
      write_and_check();
      for (int lvl = 0; lvl < 2; lvl++) begin
        int flips;
        flips = (lvl == 0) ? N / 8 : N / 4;
        hits = 0; total = 0;
        for (int r = 0; r < TRIALS; r++)
          for (int k = 0; k < P; k++) begin
            s = protos[k];
            flipped = '0;
            for (int f = 0; f < flips; ) begin
              pos = $urandom_range(0, N - 1);
              if (!flipped[pos]) begin flipped[pos] = 1'b1; s[pos] ^= 1'b1; f++; end
            end
            exchange(s, dummy);
            run(CMD_RETRIEVE);
            ref_retrieve(s, 30, want, iters, conv);
            expect_eq("iterations", int'(iterations), iters);
            expect_eq("converged", int'(converged), int'(conv));
            expect_eq("retrieve cycles", cycles, iters * (N + 2));
            exchange(N'(0), got);
            expect_eq("retrieved state matches", int'(got == want), 1);
            if (conv) m_conv++;
            total++;
            if (got == protos[k]) begin hits++; m_hit++; end
          end
        $display("m = %0d bits, start h_i = %0d/%0d: %0d of %0d retrievals reached the prototype",
                 m, flips, N, hits, total);
      end
    end
    checks += 3;
    if (m_write == 0) begin failures++; $display("FAIL no coefficient write"); end
    if (m_conv == 0)  begin failures++; $display("FAIL no retrieval converged"); end
    if (m_hit == 0)   begin failures++; $display("FAIL no prototype recalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int lim_m [3] = '{4, 6, 9};
endmodule
