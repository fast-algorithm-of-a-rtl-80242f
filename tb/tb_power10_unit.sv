// tb_power10_unit: the power-10 unit at its default size (16 digits). For
// random normalised mantissas (and 1, 9.99..9, 3.16..) the testbench drives
// the four steps and, in step 3, compares the mantissa and exponent of X^10
// with the 128-bit reference (same truncation after every product). It also
// checks that the result is valid exactly in the fourth cycle.
module tb_power10_unit;
  import dlog_ref_pkg::*;
  localparam int NDIG = 16;
  logic                 clk = 1'b0;
  logic                 rst_n, en;
  logic [1:0]           step;
  logic [NDIG-1:0][3:0] x, y;
  logic [3:0]           e;
  logic                 valid;
  power10_unit dut (.*);
  always #5 clk = ~clk;

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
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  initial begin
    logic [127:0] xr, xe;
    int de, nvalid;
    rst_n = 1'b0; en = 1'b0; step = '0; x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      for (int i = 0; i < NDIG - 1; i++) x[i] = 4'($urandom_range(0, 9));
      x[NDIG-1] = 4'($urandom_range(1, 9));
      if (n == 0) x = 64'h1000000000000000;
      if (n == 1) x = 64'h9999999999999999;
      if (n == 2) x = 64'h3162277660168379;
      xr = from_bcd(x);
      xe = xr;
      de = digit(xe);
      nvalid = 0;
      for (int s = 0; s < 4; s++) begin
        @(negedge clk);
        en = 1'b1; step = 2'(s);
        if (s == 1) x = ~x;   // input is only needed in step 0
        #1;
        if (valid) nvalid++;
        if (s == 3) begin
          check(valid, "result not valid in the fourth cycle");
          check(from_bcd(y) == xe, $sformatf("mantissa of %0d^10: %h expected %0d", xr, y, xe));
          check(int'(e) == de, $sformatf("exponent of %0d^10: %0d expected %0d", xr, e, de));
        end
      end
      check(nvalid == 1, "valid must be high for one step only");
    end
    @(negedge clk);
    en = 1'b0;
    finish_tb();
  end
endmodule
