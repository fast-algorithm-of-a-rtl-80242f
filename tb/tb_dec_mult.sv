// tb_dec_mult: the 16 x 16 digit BCD multiplier at its default size. Random
// operands (and all-nines, zero, one) are multiplied; the 32-digit BCD
// product is compared with a 128-bit binary product of the same operands.
module tb_dec_mult;
  import dlog_ref_pkg::*;
  localparam int NDIG = 16;
  logic [NDIG-1:0][3:0]   a, b;
  logic [2*NDIG-1:0][3:0] p;
  dec_mult dut (.a(a), .b(b), .p(p));

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
    logic [127:0] va, vb, vp, got;
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < NDIG; i++) begin
        a[i] = 4'($urandom_range(0, 9));
        b[i] = 4'($urandom_range(0, 9));
      end
      if (n == 0) begin a = {NDIG{4'd9}}; b = {NDIG{4'd9}}; end
      if (n == 1) begin a = '0; end
      if (n == 2) begin a = 64'h1; end
      #1;
      va = from_bcd(a); vb = from_bcd(b); vp = va * vb;
      got = 0;
      for (int i = 2 * NDIG - 1; i >= 0; i--) got = got * 10 + 128'(p[i]);
      check(got == vp, $sformatf("%0d * %0d = %0d got %0d", va, vb, vp, got));
      for (int i = 0; i < 2 * NDIG; i++) check(p[i] <= 4'd9, "not BCD");
    end
    finish_tb();
  end
endmodule
