// tb_io_register -- self-checking test of the I/O register R and switch S
// (N = 8). The testbench closes a model ring of N one-bit cells through the
// register. It checks that one connected revolution leaves R's old content
// in the ring cells (cell i = old r[i]) and the old ring state in R, that a
// disconnected revolution only rotates the ring and leaves R alone, and that
// a parallel load is ignored while a ring step takes place.
module tb_io_register;
  localparam int unsigned N = 8;

  logic         clk = 1'b0, rst_n, load, connect, shift, ring_ret, ring_in;
  logic [N-1:0] din, dout;
  logic [N-1:0] cells;
  int checks = 0, failures = 0;

  io_register #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  assign ring_ret = cells[N-1];
  always_ff @(posedge clk) if (shift) cells <= {cells[N-2:0], ring_in};

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic revolution(input logic conn);
    connect = conn; shift = 1;
    repeat (N) @(posedge clk);
    #1 shift = 0; connect = 0;
  endtask

  initial begin
    logic [N-1:0] new_state, old_state;
    rst_n = 0; load = 0; connect = 0; shift = 0; din = '0; cells = '0;
    @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      new_state = N'($urandom);
      old_state = cells;
      load = 1; din = new_state;
      @(posedge clk); #1 load = 0;
      checks++;
      if (dout !== new_state) begin failures++; $display("FAIL load"); end
      revolution(1'b1);
      checks++;
      if (cells !== new_state || dout !== old_state) begin
        failures++;
        $display("FAIL exchange cells=%b want %b, R=%b want %b", cells, new_state, dout, old_state);
      end
      // disconnected: ring rotates back to itself, R unchanged
      old_state = cells;
      new_state = dout;
      load = 1; din = ~dout;            // must be ignored while shifting
      connect = 0; shift = 1;
      repeat (N) @(posedge clk);
      #1 shift = 0; load = 0;
      checks++;
      if (cells !== old_state || dout !== new_state) begin
        failures++; $display("FAIL bypass");
      end
    end
    // R must hold its value across a bypassed revolution
    load = 1; din = 8'hA5; @(posedge clk); #1 load = 0;
    revolution(1'b0);
    checks++;
    if (dout !== 8'hA5) begin failures++; $display("FAIL hold %h", dout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
