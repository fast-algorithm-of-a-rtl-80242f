// tb_dp_update: exhaustive over nint 0..16 and lz 0..16; the coefficient must
// be nint - lz - 1 as a signed number.
module tb_dp_update;
  logic [4:0]        nint, lz;
  logic signed [5:0] coef;
  dp_update dut (.*);

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
    for (int a = 0; a <= 16; a++)
      for (int b = 0; b <= 16; b++) begin
        nint = 5'(a); lz = 5'(b);
        #1;
        check(int'(coef) == a - b - 1, $sformatf("nint %0d lz %0d coef %0d", a, b, coef));
      end
    finish_tb();
  end
endmodule
