// tb_log_controller: plays the part of the counter and of the input check.
// For random digit counts (and aborts) it follows the controller through one
// conversion and checks each cycle's control outputs against the expected
// sequence: capture, one load cycle, then steps 0..3 per digit with the
// feedback load in step 3, and a one-cycle done after 1 + 4*i cycles.
module tb_log_controller;
  import dlog_pkg::*;
  logic       clk = 1'b0;
  logic       rst_n, start, inval, cnt_zero, cnt_last;
  logic       reg_load, sel_fb, load_a, cnt_dec, p10_en, busy, done;
  logic [1:0] p10_step;
  core_ctrl_t ctrl;
  assign sel_fb   = ctrl.sel_fb;
  assign load_a   = ctrl.load_a;
  assign p10_en   = ctrl.p10_en;
  assign p10_step = ctrl.p10_step;
  log_controller dut (.*);
  always #5 clk = ~clk;

  int cnt;
  assign cnt_zero = (cnt == 0);
  assign cnt_last = (cnt == 1);
  always @(posedge clk) if (reg_load) cnt <= $urandom_range(0, 6); else if (cnt_dec) cnt <= cnt - 1;

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
    int ni, cyc;
    bit ab;
    cnt = 0;
    rst_n = 1'b0; start = 1'b0; inval = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      start = 1'b1;
      #1;
      check(reg_load && !busy, "capture when idle");
      @(negedge clk);
      start = 1'b0;
      ni = cnt;
      ab = ($urandom_range(0, 7) == 0);
      inval = ab;
      check(busy && load_a && !sel_fb && !p10_en, "load cycle");
      @(negedge clk);
      inval = 1'b0;
      cyc = 1;
      if (!(ni == 0 || ab)) begin
        for (int d = 0; d < ni; d++)
          for (int s = 0; s < 4; s++) begin
            check(p10_en && int'(p10_step) == s, $sformatf("digit %0d step %0d", d, s));
            check(load_a == (s == 3) && sel_fb == (s == 3) && cnt_dec == (s == 3), "feedback in step 3");
            check(!done && !reg_load, "no done while iterating");
            @(negedge clk);
            cyc++;
          end
      end
      check(done && !p10_en, $sformatf("done after %0d cycles, expected %0d", cyc, (ab ? 1 : 1 + 4 * ni)));
      @(negedge clk);
      check(!done && !busy, "back to idle");
    end
    finish_tb();
  end
endmodule
