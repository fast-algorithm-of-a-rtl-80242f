// tb_sd_adder: random signed-digit operands (digits -9..9) on an 8-digit
// adder; the sum must equal x + y modulo 10^8 and every sum digit must stay
// in -9..9. Values are formed in the testbench with 64-bit integers.
module tb_sd_adder;
  localparam int W = 8;
  logic [W-1:0][4:0] x, y, s;
  sd_adder #(.W(W)) dut (.x(x), .y(y), .s(s));

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

  function automatic longint value(input logic [W-1:0][4:0] v);
    longint r;
    r = 0;
    for (int i = W - 1; i >= 0; i--) r = r * 10 + longint'($signed(v[i]));
    return r;
  endfunction

  initial begin
    longint d;
    bit inrange;
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < W; i++) begin
        x[i] = 5'(int'($urandom_range(0, 18)) - 9);
        y[i] = 5'(int'($urandom_range(0, 18)) - 9);
        if (n < 2) begin x[i] = (n == 0) ? 5'sd9 : -5'sd9; y[i] = x[i]; end
      end
      #1;
      d = (value(x) + value(y) - value(s)) % 64'sd100000000;
      check(d == 0, $sformatf("sum %0d + %0d -> %0d", value(x), value(y), value(s)));
      inrange = 1'b1;
      for (int i = 0; i < W; i++)
        if ($signed(s[i]) > 9 || $signed(s[i]) < -9) inrange = 1'b0;
      check(inrange, "sum digit out of range");
    end
    finish_tb();
  end
endmodule
