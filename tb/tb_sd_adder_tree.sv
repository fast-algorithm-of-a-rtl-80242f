// tb_sd_adder_tree: a 5-operand, 8-digit tree is fed random signed-digit
// operands; the sum must equal the operands' total modulo 10^8.
module tb_sd_adder_tree;
  localparam int N = 5;
  localparam int W = 8;
  logic [N-1:0][W-1:0][4:0] ops;
  logic [W-1:0][4:0]        sum;
  sd_adder_tree #(.N(N), .W(W)) dut (.ops(ops), .sum(sum));

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
    longint tot, got, dd;
    for (int n = 0; n < 3000; n++) begin
      for (int k = 0; k < N; k++)
        for (int i = 0; i < W; i++) ops[k][i] = 5'(int'($urandom_range(0, 18)) - 9);
      #1;
      tot = 0;
      for (int k = 0; k < N; k++) begin
        dd = 0;
        for (int i = W - 1; i >= 0; i--) dd = dd * 10 + longint'($signed(ops[k][i]));
        tot = tot + dd;
      end
      got = 0;
      for (int i = W - 1; i >= 0; i--) got = got * 10 + longint'($signed(sum[i]));
      check(((tot - got) % 64'sd100000000) == 0, $sformatf("total %0d got %0d", tot, got));
    end
    finish_tb();
  end
endmodule
