// tb_dps: random 16-character strings with zero, one or two decimal-point
// characters and occasional illegal characters. The expected digits without
// the point, the integer-digit count and the error flag are derived in the
// testbench from a character-by-character rebuild of the string.
module tb_dps;
  localparam int NDIG = 16;
  logic [NDIG-1:0][3:0] p, mag;
  logic [4:0]           nint;
  logic                 bad;
  dps dut (.*);

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
    logic [NDIG-1:0][3:0] em;
    int k, k2, j, enint;
    bit ebad;
    for (int n = 0; n < 4000; n++) begin
      for (int i = 0; i < NDIG; i++) p[i] = 4'($urandom_range(0, 9));
      k = $urandom_range(0, NDIG);          // NDIG: no point
      k2 = ($urandom_range(0, 9) == 0) ? int'($urandom_range(0, NDIG - 1)) : -1;
      if (k < NDIG) p[k] = 4'hA;
      if (k2 >= 0) p[k2] = 4'hA;
      ebad = (k2 >= 0 && k2 != k && k < NDIG);
      if (k == NDIG && k2 >= 0) k = k2;    // the second point is the only one
      if ($urandom_range(0, 9) == 0) begin
        p[$urandom_range(0, NDIG - 1)] = 4'($urandom_range(11, 15));
        ebad = 1'b1;
      end
      #1;
      if (!ebad) begin
        // rebuild: digits from the top down, skipping the point
        em = '0; j = 0;
        for (int i = NDIG - 1; i >= 0; i--) begin
          if (p[i] != 4'hA) begin
            em = {em[NDIG-2:0], p[i]};
            j++;
          end
        end
        enint = (k < NDIG) ? NDIG - k : NDIG;
        check(mag == em, $sformatf("%h: mag %h expected %h", p, mag, em));
        check(int'(nint) == enint, $sformatf("%h: nint %0d expected %0d", p, nint, enint));
      end
      check(bad == ebad, $sformatf("%h: bad %0d expected %0d", p, bad, ebad));
    end
    finish_tb();
  end
endmodule
