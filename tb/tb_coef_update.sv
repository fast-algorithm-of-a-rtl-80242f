// tb_coef_update: random characteristic followed by a random number of
// digits; the stored characteristic, the left-aligned digits (zeros behind)
// and the digit count are checked against a copy kept in the testbench.
// Writes past 16 digits must be ignored.
module tb_coef_update;
  localparam int NFRAC = 16;
  logic                  clk = 1'b0;
  logic                  rst_n, first, next;
  logic signed [5:0]     coef, char_q;
  logic [NFRAC-1:0][3:0] mant_q;
  logic [4:0]            nmant_q;
  coef_update dut (.*);
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
    logic [NFRAC-1:0][3:0] em;
    int ch, nd, cnt;
    rst_n = 1'b0; first = 1'b0; next = 1'b0; coef = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      ch = int'($urandom_range(0, 31)) - 16;
      nd = $urandom_range(0, NFRAC + 2);
      @(negedge clk);
      first = 1'b1; coef = 6'(ch);
      @(negedge clk);
      first = 1'b0;
      em = '0; cnt = 0;
      for (int j = 0; j < nd; j++) begin
        coef = 6'($urandom_range(0, 9));
        next = ($urandom_range(0, 3) != 0);
        if (next && cnt < NFRAC) begin em[NFRAC-1-cnt] = coef[3:0]; cnt++; end
        @(negedge clk);
      end
      next = 1'b0;
      #1;
      check(int'(char_q) == ch, $sformatf("char %0d expected %0d", char_q, ch));
      check(mant_q == em, $sformatf("mant %h expected %h", mant_q, em));
      check(int'(nmant_q) == cnt, $sformatf("count %0d expected %0d", nmant_q, cnt));
    end
    finish_tb();
  end
endmodule
