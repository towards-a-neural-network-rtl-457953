// tb_nn_chip_recall7 -- the recall workload with 7-bit coefficients (6 fraction bits):
// 64 neurons, 16 prototypes, starts 8 and 16 bits away; learning may not settle.
//
// A reference model in the testbench computes, at matrix level and with
// plain integer arithmetic, what the network must produce:
//   learning  v_i = sum_j C_ij s_j, inc_i = (ONE s_i - v_i) / N (truncated
//             towards zero), C_ij = clamp(C_ij + inc_i s_j, CMIN, CMAX),
//             with ONE = 2^COEF_FRAC and [CMIN, CMAX] the COEF_W-bit range
//   retrieval s_i <- (sum_j C_ij s_j >= 0) ? +1 : -1 for all i at once,
//             repeated until nothing changes or the iteration limit is hit.
// The test clears the coefficients, learns the prototypes epoch by epoch
// until no increment is non-zero, reads back the whole coefficient matrix
// after every epoch, retrieves every prototype from a noisy start state,
// checks a run stopped by the iteration limit, and finally writes an
// off-line computed matrix into the chip and retrieves with it. Cycle counts
// are checked against the schedule: 3N+1 cycles per learning step, N+2 per
// retrieval update, N per exchange. Each mechanism must happen at least once.
module tb_nn_chip_recall7;
  import nn_pkg::*;
  localparam int unsigned N      = nn_pkg::N_NEURONS;
  localparam int unsigned P      = 16;
  localparam int unsigned EPOCHS = 100;
  localparam int unsigned NOISE_A = 8;  // bits flipped in retrieval start states, first level
  localparam int unsigned NOISE_B = 16;  // second level
  localparam int unsigned TRIALS  = 4;  // retrievals per prototype and level
  localparam int unsigned LW     = $clog2(N);
  localparam int unsigned COEF_W    = 7;  // coefficient word, sign included
  localparam int unsigned COEF_FRAC = 6;  // its fraction bits
  localparam bit          NEED_LEARN_CONV = 0;  // learning must reach zero increments
  localparam int ONE  = 1 << COEF_FRAC;
  localparam int CMAX = (1 << (COEF_W - 1)) - 1;
  localparam int CMIN = -CMAX - 1;

  logic          clk = 1'b0, rst_n;
  cmd_e          cmd;
  logic          cmd_valid, cmd_ready, busy, done, converged, changed, xi, io_load;
  logic [7:0]    max_iter, iterations;
  logic [N-1:0]  io_din, io_dout;
  logic [LW-1:0] coef_sel, coef_col;
  logic [COEF_W-1:0] coef_wdata, coef_rdata;

  int checks = 0, failures = 0;
  int cref [N][N];        // reference coefficients
  int wmat [N][N];        // matrix streamed into the chip by CMD_WRITE_C
  int rd   [N][N];        // matrix read back from the chip
  logic [N-1:0] protos [P];
  int cycles;
  // mechanism counters
  int it_sum = 0, it_max = 0;  // updates per converged retrieval
  int m_exchange, m_learn_nz, m_learn_zero, m_conv, m_limit, m_change, m_write, m_clear, m_recall;

  nn_chip #(.COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC)) dut (.*);

  always #5 clk = ~clk;

  assign coef_wdata = COEF_W'(wmat[coef_sel][coef_col]);

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
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

  // reference learning step; returns 1 if any increment was non-zero
  function automatic bit ref_learn(logic [N-1:0] s);
    int inc [N];
    bit any = 0;
    for (int i = 0; i < N; i++) begin
      int v = 0;
      for (int j = 0; j < N; j++) v += cref[i][j] * sv(s, j);
      inc[i] = (ONE * sv(s, i) - v) / int'(N);
      if (inc[i] != 0) any = 1;
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int c = cref[i][j] + inc[i] * sv(s, j);
        cref[i][j] = c > CMAX ? CMAX : (c < CMIN ? CMIN : c);
      end
    return any;
  endfunction

  // reference retrieval
  task automatic ref_retrieve(input logic [N-1:0] s0, input int lim,
                              output logic [N-1:0] s, output int iters, output bit conv);
    logic [N-1:0] nx;
    s = s0; iters = 0; conv = 0;
    forever begin
      for (int i = 0; i < N; i++) begin
        int v = 0;
        for (int j = 0; j < N; j++) v += cref[i][j] * sv(s, j);
        nx[i] = (v >= 0);
      end
      iters++;
      if (nx == s) begin conv = 1; break; end
      s = nx;
      if (iters >= lim) break;
    end
  endtask

  // issue one command and wait for its done pulse; cycles = busy cycles
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
    expect_eq("exchange cycles", cycles, N);
    out_s = io_dout;
    m_exchange++;
  endtask

  // read the whole matrix through the rotating memories
  task automatic read_matrix();
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
  endtask

  task automatic compare_matrix(string what);
    int bad = 0;
    read_matrix();
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (rd[i][j] != cref[i][j]) begin
          if (bad < 5) $display("FAIL %s C[%0d][%0d] = %0d, expected %0d", what, i, j, rd[i][j], cref[i][j]);
          bad++;
        end
    checks++;
    if (bad != 0) failures++;
  endtask

  task automatic retrieve_check(input logic [N-1:0] start, input int lim, output logic [N-1:0] got);
    logic [N-1:0] want, dummy;
    int iters;
    bit conv;
    exchange(start, dummy);
    max_iter = 8'(lim);
    run(CMD_RETRIEVE);
    ref_retrieve(start, lim, want, iters, conv);
    expect_eq("iterations", int'(iterations), iters);
    expect_eq("converged", int'(converged), int'(conv));
    expect_eq("retrieve cycles", cycles, iters * (N + 2));
    exchange(N'(0), got);
    expect_eq("retrieved state matches", int'(got == want), 1);
    if (conv) begin m_conv++; it_sum += iters; if (iters > it_max) it_max = iters; end
    else m_limit++;
    if (iters > 1) m_change++;
  endtask

  initial begin
    logic [N-1:0] s, got, dummy;
    bit any, want_ch;
    rst_n = 0; cmd = CMD_ROTATE; cmd_valid = 0; io_load = 0; io_din = '0;
    max_iter = 8'd20; coef_sel = '0;
    m_exchange = 0; m_learn_nz = 0; m_learn_zero = 0; m_conv = 0; m_limit = 0;
    m_change = 0; m_write = 0; m_clear = 0; m_recall = 0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin cref[i][j] = 0; wmat[i][j] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // C(0) = 0
    run(CMD_CLEAR_C);
    expect_eq("clear cycles", cycles, N);
    m_clear++;
    compare_matrix("after clear");

    // on-chip learning
    for (int k = 0; k < P; k++) protos[k] = N'({$urandom, $urandom});
    for (int e = 0; e < EPOCHS; e++) begin
      any = 0;
      for (int k = 0; k < P; k++) begin
        @(negedge clk);
        io_din = protos[k]; io_load = 1;
        @(negedge clk);
        io_load = 0;
        run(CMD_LEARN);
        expect_eq("learn cycles", cycles, 3 * N + 1);
        want_ch = ref_learn(protos[k]);
        expect_eq("learn changed", int'(changed), int'(want_ch));
        if (changed) m_learn_nz++; else m_learn_zero++;
        any |= want_ch;
      end
      compare_matrix($sformatf("epoch %0d", e));
      if (!any) begin
        $display("learning converged after %0d epochs", e + 1);
        break;
      end
    end

    // retrieval from noisy prototypes at two distances (distinct flipped bits)
    for (int lvl = 0; lvl < 2; lvl++) begin
      int flips, hr_sum, hits;
      flips  = (lvl == 0) ? NOISE_A : NOISE_B;
      hr_sum = 0;
      hits   = 0;
      for (int r = 0; r < TRIALS; r++)
        for (int k = 0; k < P; k++) begin
          logic [N-1:0] flipped;
          int hr;
          s = protos[k];
          flipped = '0;
          for (int f = 0; f < flips; ) begin
            int pos;
            pos = $urandom_range(0, N - 1);
            if (!flipped[pos]) begin flipped[pos] = 1'b1; s[pos] ^= 1'b1; f++; end
          end
          retrieve_check(s, 20, got);
          hr = $countones(got ^ protos[k]);
          hr_sum += hr;
          if (hr == 0) begin hits++; m_recall++; end
        end
      $display("start distance h_i = %0d/%0d: %0d of %0d retrievals reached the prototype, mean final distance %0d/1000 of N",
               flips, N, hits, TRIALS * P, hr_sum * 1000 / (int'(N) * TRIALS * P));
    end
    // iteration limit: start far from every prototype, allow one update
    for (int t = 0; t < 8 && m_limit == 0; t++) retrieve_check(N'({$urandom, $urandom}), 1, got);

    // off-line learned matrix (Hebbian, scaled by ONE/N) written into the chip
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int c;
        c = 0;
        for (int k = 0; k < P; k++) c += sv(protos[k], i) * sv(protos[k], j) * ONE / int'(N);
        wmat[i][j] = c > CMAX ? CMAX : (c < CMIN ? CMIN : c);
        cref[i][j] = wmat[i][j];
      end
    for (int i = 0; i < N; i++) begin
      coef_sel = LW'(i);
      run(CMD_WRITE_C);
      expect_eq("write cycles", cycles, N);
      m_write++;
    end
    compare_matrix("written matrix");
    for (int k = 0; k < P; k++) begin
      s = protos[k];
      s[$urandom_range(0, N - 1)] ^= 1'b1;
      retrieve_check(s, 20, got);
    end

    $display("mechanisms: exchange=%0d learn_nonzero=%0d learn_zero=%0d converged=%0d limit=%0d state_change=%0d write=%0d clear=%0d recalled=%0d/%0d",
             m_exchange, m_learn_nz, m_learn_zero, m_conv, m_limit, m_change, m_write, m_clear, m_recall, 2 * TRIALS * P);
    $display("converged retrievals: %0d updates on average (x%0d cycles), at most %0d",
             it_sum / (m_conv > 0 ? m_conv : 1), N + 2, it_max);
    if (m_exchange == 0)   begin failures++; $display("FAIL no exchange"); end
    if (m_learn_nz == 0)   begin failures++; $display("FAIL no learning update"); end
    if (NEED_LEARN_CONV && m_learn_zero == 0) begin failures++; $display("FAIL learning never converged"); end
    if (m_conv == 0)       begin failures++; $display("FAIL retrieval never converged"); end
    if (m_limit == 0)      begin failures++; $display("FAIL iteration limit never reached"); end
    if (m_change == 0)     begin failures++; $display("FAIL no state ever changed"); end
    if (m_write == 0)      begin failures++; $display("FAIL no coefficient write"); end
    if (m_clear == 0)      begin failures++; $display("FAIL no clear"); end
    checks += 8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
