// tb_neuron_alu -- self-checking test of the neuron arithmetic. Reference
// values use plain integer arithmetic: the potential step v +/- c, the
// learning increment (sigma*256 - v)/64 with division truncating towards zero,
// and the coefficient update clamped to [-256, 255].
module tb_neuron_alu;
  localparam int ACC_W = 16, COEF_W = 9;

  logic signed [ACC_W-1:0]  v, acc_next, err_next;
  logic signed [COEF_W-1:0] c, c_next;
  logic                     sigma;
  int checks = 0, failures = 0;

  neuron_alu dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int vi, input int ci, input bit s);
    int e_acc, e_err, e_c, s_val;
    v = ACC_W'(vi); c = COEF_W'(ci); sigma = s;
    #1;
    s_val = s ? 1 : -1;
    e_acc = vi + s_val * ci;
    e_err = (s_val * 256 - vi) / 64;
    e_c   = ci + s_val * vi;
    if (e_c > 255) e_c = 255;
    if (e_c < -256) e_c = -256;
    checks++;
    if (int'(acc_next) !== e_acc || int'(err_next) !== e_err || int'(c_next) !== e_c) begin
      failures++;
      $display("FAIL v=%0d c=%0d s=%0d: acc %0d/%0d err %0d/%0d c %0d/%0d",
               vi, ci, s, acc_next, e_acc, err_next, e_err, c_next, e_c);
    end
  endtask

  initial begin
    // directed corners
    check(0, 0, 1);          // zero error -> increments +4
    check(256, 10, 1);       // exact prototype potential: zero increment
    check(-256, -10, 0);
    check(256 + 63, 0, 1);   // error -63 truncates to 0
    check(256 - 64, 0, 1);   // error +64 -> +1
    check(256 + 64, 0, 1);   // error -64 -> -1
    check(200, 255, 1);      // saturate high
    check(200, -256, 0);     // saturate low
    check(-16000, 255, 1);
    check(16000, -256, 0);
    for (int n = 0; n < 20000; n++)
      check($urandom_range(0, 32000) - 16000, $urandom_range(0, 511) - 256, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
