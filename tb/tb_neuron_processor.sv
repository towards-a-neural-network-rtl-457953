// tb_neuron_processor -- self-checking test of one neuron processor (N = 8).
// The testbench keeps its own model of the neuron's registers (ring cell,
// sigma(t-1), accumulator, coefficient list) written from the arithmetic of
// the network equations, and drives random legal control-line cycles:
// plain ring steps, potential steps, learning-update steps, clears, external
// writes, decisions and increment cycles. After each cycle it compares the
// ring output, memory head and both OR-chain outputs with the model.
module tb_neuron_processor;
  import nn_pkg::*;
  localparam int unsigned N = 8;

  logic       clk = 1'b0, rst_n;
  ctrl_t      ctrl;
  logic       sigma_in, sigma_out, xi_in, xi_out, lam_in, lam_out, ext_wr;
  logic [8:0] ext_wdata, c_head;
  int checks = 0, failures = 0;
  bit head_on = 0;  // memory content is unknown until the clear revolution
  int n_decide_change = 0, n_learn_nz = 0;

  // model state
  bit m_cell, m_prev;
  int m_v;
  int m_mem [N];

  neuron_processor #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wrap16(int x);
    return int'(signed'(16'(x)));
  endfunction
  function automatic int sx9(logic [8:0] x);
    return int'(signed'(x));
  endfunction

  task automatic cycle(input ctrl_t c, input bit sin, input bit wr, input logic [8:0] wd);
    int s, head, nc, e;
    ctrl = c; sigma_in = sin; ext_wr = wr; ext_wdata = wd;
    xi_in = 1'($urandom); lam_in = 1'($urandom);
    #1;
    // chains are combinational: check them before the edge
    checks++;
    if (xi_out !== (xi_in | (m_cell ^ m_prev)) || lam_out !== (lam_in | (m_v != 0))) begin
      failures++; $display("FAIL chains xi=%0b lam=%0b", xi_out, lam_out);
    end
    @(posedge clk);
    s = m_cell ? 1 : -1;
    head = m_mem[0];
    if (c.decide) begin
      if (m_cell != (m_v >= 0)) n_decide_change++;
      m_prev = m_cell;
      m_cell = (m_v >= 0);
    end
    if (c.shift) begin
      nc = head;
      if (c.clr_c) nc = 0;
      else if (c.upd) begin
        nc = head + s * m_v;
        if (nc > 255) nc = 255;
        if (nc < -256) nc = -256;
      end else if (wr) nc = sx9(wd);
      for (int k = 0; k < N - 1; k++) m_mem[k] = m_mem[k+1];
      m_mem[N-1] = nc;
      m_cell = sin;
    end
    if (c.clr_v) m_v = 0;
    else if (c.shift && c.acc) m_v = wrap16(m_v + s * head);
    else if (c.err) begin
      e = (s * 256 - m_v) / int'(N);
      if (e != 0) n_learn_nz++;
      m_v = e;
    end
    #1;
    checks++;
    if (sigma_out !== m_cell || (head_on && sx9(c_head) !== m_mem[0])) begin
      failures++;
      $display("FAIL sigma=%0b/%0b head=%0d/%0d", sigma_out, m_cell, sx9(c_head), m_mem[0]);
    end
  endtask

  initial begin
    ctrl_t c;
    ctrl = CTRL_IDLE; sigma_in = 0; ext_wr = 0; ext_wdata = '0; xi_in = 0; lam_in = 0;
    rst_n = 0;
    @(posedge clk); #1;
    rst_n = 1;
    m_cell = 0; m_prev = 0; m_v = 0;
    // clear revolution, then one revolution of external writes
    for (int k = 0; k < N; k++) m_mem[k] = 0;
    c = CTRL_IDLE; c.shift = 1; c.clr_c = 1;
    for (int k = 0; k < N; k++) cycle(c, 1'($urandom), 0, '0);
    head_on = 1;
    c = CTRL_IDLE; c.shift = 1;
    for (int k = 0; k < N; k++) cycle(c, 1'($urandom), 1, 9'($urandom));
    // random operation sequences organised as revolutions
    for (int r = 0; r < 400; r++) begin
      int kind;
      kind = $urandom_range(0, 5);
      c = CTRL_IDLE;
      unique case (kind)
        0: begin c.shift = 1; c.acc = 1; end
        1: begin c.shift = 1; c.upd = 1; end
        2: c.shift = 1;
        3: begin c.shift = 1; c.acc = 1; end
        4: begin c.shift = 1; c.clr_v = 1; end
        default: begin c.shift = 1; c.acc = 1; end
      endcase
      for (int k = 0; k < N; k++) cycle(c, 1'($urandom), (kind == 2) && 1'($urandom), 9'($urandom));
      // single-cycle steps in between
      c = CTRL_IDLE;
      kind = $urandom_range(0, 3);
      unique case (kind)
        0: c.decide = 1;
        1: c.err = 1;
        2: begin c.decide = 1; c.clr_v = 1; end
        default: c.clr_v = 1;
      endcase
      cycle(c, 1'($urandom), 0, '0);
    end
    checks++;
    if (n_decide_change == 0 || n_learn_nz == 0) begin
      failures++; $display("FAIL coverage: decisions changing %0d, nonzero increments %0d",
                           n_decide_change, n_learn_nz);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
