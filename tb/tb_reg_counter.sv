// tb_reg_counter: load of random P and i (including i > 16, which must clamp
// to 16), then decrements with random gaps; the count, zero and last flags
// and the held registers are checked every cycle.
module tb_reg_counter;
  localparam int NDIG = 16;
  logic                 clk = 1'b0;
  logic                 rst_n, load, dec, zero, last;
  logic [NDIG-1:0][3:0] p_in, p_q;
  logic [4:0]           i_in, i_q, cnt_q;
  reg_counter dut (.*);
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
    int ei, ec;
    logic [NDIG-1:0][3:0] ep;
    rst_n = 1'b0; load = 1'b0; dec = 1'b0; p_in = '0; i_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 100; n++) begin
      ep = {$urandom, $urandom};
      ei = $urandom_range(0, 31);
      p_in = ep; i_in = 5'(ei); load = 1'b1;
      @(negedge clk);
      load = 1'b0; p_in = ~ep; i_in = ~i_in;
      ec = (ei > 16) ? 16 : ei;
      for (int k = 0; k < 40; k++) begin
        check(p_q == ep && int'(i_q) == ((ei > 16) ? 16 : ei), "held registers");
        check(int'(cnt_q) == ec && zero == (ec == 0) && last == (ec == 1),
              $sformatf("count %0d expected %0d", cnt_q, ec));
        dec = $urandom_range(0, 1);
        @(negedge clk);
        if (dec && ec > 0) ec--;
        dec = 1'b0;
      end
    end
    finish_tb();
  end
endmodule
