// tb_result_update: random characteristic (-16..15) and mantissa (with random
// trailing zeros, and all-zero); the sign-magnitude output, read back as a
// scaled integer, must equal (c * 10^16 + mantissa) in 64-bit arithmetic.
// Includes the worked example -6 + 0.091 = -5.909.
module tb_result_update;
  localparam int NFRAC = 16;
  logic signed [5:0]     char_q;
  logic [NFRAC-1:0][3:0] mant_q, frac_d;
  logic                  neg;
  logic [1:0][3:0]       int_d;
  result_update dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  initial begin
    longint m, exp_v, got;
    int nz;
    for (int n = 0; n < 3000; n++) begin
      char_q = 6'(int'($urandom_range(0, 31)) - 16);
      for (int i = 0; i < NFRAC; i++) mant_q[i] = 4'($urandom_range(0, 9));
      nz = $urandom_range(0, NFRAC);
      for (int i = 0; i < nz; i++) mant_q[i] = 4'd0;
      if (n == 0) begin char_q = -6'sd6; mant_q = {16'h0910, 48'h0}; end
      #1;
      m = 0; got = 0;
      for (int i = NFRAC - 1; i >= 0; i--) begin
        m = m * 10 + longint'(mant_q[i]);
        got = got * 10 + longint'(frac_d[i]);
      end
      exp_v = longint'(char_q) * 64'sd10000000000000000 + m;
      got = got + (longint'(int_d[1]) * 10 + longint'(int_d[0])) * 64'sd10000000000000000;
      if (neg) got = -got;
      check(got == exp_v, $sformatf("c %0d m %h: got %0d expected %0d", char_q, mant_q, got, exp_v));
      check(neg == (exp_v < 0), "sign");
      if (n == 0) check(int_d == 8'h05 && frac_d == {16'h9090, 48'h0}, "example -5.909");
    end
    finish_tb();
  end
endmodule
