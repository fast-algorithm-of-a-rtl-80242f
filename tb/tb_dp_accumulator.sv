// tb_dp_accumulator: random carry sequences c0..c3 over the four steps; e10
// in step 3 must be 5*c0 + 2*c1 + c2 + c3 (exponent of X^10 from those of
// X^2, X^4, X^8 and the last product). A disabled cycle must change nothing.
module tb_dp_accumulator;
  logic       clk = 1'b0;
  logic       rst_n, en, c;
  logic [1:0] step;
  logic [3:0] e10;
  dp_accumulator dut (.*);
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
    int cs [4];
    rst_n = 1'b0; en = 1'b0; c = 1'b0; step = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      for (int s = 0; s < 4; s++) cs[s] = (n < 16) ? ((n >> s) & 1) : int'($urandom_range(0, 1));
      for (int s = 0; s < 4; s++) begin
        @(negedge clk);
        en = 1'b1; step = 2'(s); c = cs[s][0];
        if (s == 3) begin
          #1;
          check(int'(e10) == 5 * cs[0] + 2 * cs[1] + cs[2] + cs[3],
                $sformatf("c=%0d%0d%0d%0d e10=%0d", cs[0], cs[1], cs[2], cs[3], e10));
        end
      end
      // idle cycle with other step values: state must hold
      @(negedge clk);
      en = 1'b0; step = 2'd1; c = 1'b1;
      @(negedge clk);
      step = 2'd3; c = cs[3][0];
      #1;
      check(int'(e10) == 5 * cs[0] + 2 * cs[1] + cs[2] + cs[3], "state changed while disabled");
    end
    finish_tb();
  end
endmodule
