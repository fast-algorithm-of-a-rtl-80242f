// tb_sd_to_bcd: random signed-digit numbers of 8 digits are converted to BCD;
// the result must equal the value modulo 10^8 (computed with 64-bit integers).
module tb_sd_to_bcd;
  localparam int W = 8;
  logic [W-1:0][4:0] v;
  logic [W-1:0][3:0] d;
  sd_to_bcd #(.W(W)) dut (.v(v), .d(d));

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
    longint val, got, m;
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < W; i++) v[i] = 5'(int'($urandom_range(0, 18)) - 9);
      if (n == 0) v = '0;
      if (n == 1) for (int i = 0; i < W; i++) v[i] = -5'sd9;
      #1;
      val = 0; got = 0;
      for (int i = W - 1; i >= 0; i--) begin
        val = val * 10 + longint'($signed(v[i]));
        got = got * 10 + longint'(d[i]);
      end
      m = val % 64'sd100000000;
      if (m < 0) m = m + 64'sd100000000;
      check(got == m, $sformatf("value %0d -> %0d expected %0d", val, got, m));
      for (int i = 0; i < W; i++) check(d[i] <= 4'd9, "not BCD");
    end
    finish_tb();
  end
endmodule
