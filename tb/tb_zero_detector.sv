// tb_zero_detector: for every leading-zero count 0..16 and random digits
// below, the count, the left-aligned value (x * 10^lz, checked as an integer)
// and the zero flag are compared with the testbench's own computation.
module tb_zero_detector;
  import dlog_ref_pkg::*;
  localparam int NDIG = 16;
  logic [NDIG-1:0][3:0] d, norm;
  logic [4:0]           lz;
  logic                 zero;
  zero_detector dut (.*);

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
    logic [127:0] v, nv;
    int z;
    for (int n = 0; n < 3400; n++) begin
      z = n % (NDIG + 1);
      for (int i = 0; i < NDIG; i++) d[i] = 4'($urandom_range(0, 9));
      if (z < NDIG) d[NDIG-1-z] = 4'($urandom_range(1, 9));
      for (int i = NDIG - 1; i > NDIG - 1 - z; i--) d[i] = 4'd0;
      #1;
      v = from_bcd(d);
      nv = v;
      for (int i = 0; i < z; i++) nv = nv * 10;
      check(int'(lz) == z, $sformatf("%h: lz %0d expected %0d", d, lz, z));
      check(zero == (z == NDIG), "zero flag");
      check(from_bcd(norm) == nv % (E16), $sformatf("%h: norm %h", d, norm));
    end
    finish_tb();
  end
endmodule
