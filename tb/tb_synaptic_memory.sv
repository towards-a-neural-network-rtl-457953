// tb_synaptic_memory -- self-checking test of the circular coefficient shift
// register. A reference array rotated in the testbench is compared with the
// head after every cycle while random shift / write / hold cycles are applied.
// Also checks that after WORDS plain shifts every word is back in place.
module tb_synaptic_memory;
  localparam int unsigned WORDS = 8;
  localparam int unsigned W     = 9;

  logic         clk = 1'b0;
  logic         shift, wr_en;
  logic [W-1:0] wdata, head;
  logic [W-1:0] ref_mem [WORDS];
  int checks = 0, failures = 0;
  bit check_on = 0;  // the memory is not initialised until the first revolution

  synaptic_memory #(.WORDS(WORDS), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic s, input logic w, input logic [W-1:0] d);
    logic [W-1:0] h;
    shift = s; wr_en = w; wdata = d;
    @(posedge clk);
    if (s) begin
      h = ref_mem[0];
      for (int k = 0; k < WORDS - 1; k++) ref_mem[k] = ref_mem[k+1];
      ref_mem[WORDS-1] = w ? d : h;
    end
    #1;
    if (!check_on) return;
    checks++;
    if (head !== ref_mem[0]) begin
      failures++;
      $display("FAIL head=%0h expected %0h", head, ref_mem[0]);
    end
  endtask

  initial begin
    shift = 0; wr_en = 0; wdata = '0;
    // fill with known words: word k written at step k
    for (int k = 0; k < WORDS; k++) ref_mem[k] = '0;
    for (int k = 0; k < WORDS; k++) step(1'b1, 1'b1, W'(k * 37 + 5));
    check_on = 1;
    // after one revolution of writes the head is the first word written
    checks++;
    if (head !== W'(5)) begin failures++; $display("FAIL first word %0h", head); end
    // a full revolution without writes leaves every word in place
    for (int k = 0; k < WORDS; k++) begin
      checks++;
      if (head !== W'(k * 37 + 5)) begin failures++; $display("FAIL word %0d = %0h", k, head); end
      step(1'b1, 1'b0, '0);
    end
    // random mix
    for (int n = 0; n < 2000; n++)
      step(1'($urandom_range(0, 3) != 0), 1'($urandom_range(0, 1)), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
