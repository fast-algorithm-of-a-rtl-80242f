// tb_core_unit: the data path driven by a controller sequence written in the
// testbench (load, then four power-10 steps per digit with the feedback load
// in step 3). For the worked examples and random inputs the characteristic
// and every mantissa digit are compared with the 128-bit reference model;
// zero and malformed inputs must raise the error flag.
module tb_core_unit;
  import dlog_pkg::*;
  import dlog_ref_pkg::*;
  localparam int NDIG  = 16;
  localparam int NFRAC = 16;
  logic                  clk = 1'b0;
  logic                  rst_n;
  logic [NDIG-1:0][3:0]  p;
  logic                  sel_fb, load_a, p10_en;
  logic [1:0]            p10_step;
  logic                  bad, err_q;
  logic signed [5:0]     char_q;
  logic [NFRAC-1:0][3:0] mant_q, res_frac;
  logic [4:0]            nmant_q;
  logic                  res_neg;
  logic [1:0][3:0]       res_int;
  core_ctrl_t            ctrl;
  assign ctrl = '{sel_fb: sel_fb, load_a: load_a, p10_en: p10_en, p10_step: p10_step};
  core_unit dut (.*);
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

  task automatic convert(input logic [63:0] pin, input int nd);
    int chr, d;
    logic [127:0] x;
    real val;
    bit ok;
    @(negedge clk);
    p = pin; sel_fb = 1'b0; load_a = 1'b1; p10_en = 1'b0;
    @(negedge clk);
    load_a = 1'b0;
    ok = parse(pin, chr, x, val);
    check(err_q == !ok, $sformatf("%h error flag %0d", pin, err_q));
    if (!ok) return;
    check(int'(char_q) == chr, $sformatf("%h char %0d expected %0d", pin, char_q, chr));
    for (int k = 0; k < nd; k++) begin
      for (int s = 0; s < 4; s++) begin
        p10_en = 1'b1; p10_step = 2'(s);
        sel_fb = (s == 3); load_a = (s == 3);
        @(negedge clk);
      end
      p10_en = 1'b0; sel_fb = 1'b0; load_a = 1'b0;
      d = digit(x);
      check(mant_q[NFRAC-1-k] == 4'(d), $sformatf("%h digit %0d: %0d expected %0d", pin, k + 1, mant_q[NFRAC-1-k], d));
    end
    check(int'(nmant_q) == nd, "digit count");
  endtask

  initial begin
    logic [NDIG-1:0][3:0] pr;
    rst_n = 1'b0; p = '0; sel_fb = 1'b0; load_a = 1'b0; p10_en = 1'b0; p10_step = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    convert(64'h123456789A123456, 3);
    check(!res_neg && res_int == 8'h08 && res_frac == {16'h0910, 48'h0}, "example 1: 8.091");
    convert(64'h0A00000123456789, 3);
    check(res_neg && res_int == 8'h05 && res_frac == {16'h9090, 48'h0}, "example 2: -5.909");
    convert(64'h0000000000000000, 2);
    convert(64'h00BA000000000000, 2);
    for (int n = 0; n < 40; n++) begin
      for (int i = 0; i < NDIG; i++) pr[i] = 4'($urandom_range(0, 9));
      for (int i = NDIG - 1; i >= NDIG - int'($urandom_range(0, 12)); i--) pr[i] = 4'd0;
      if ($urandom_range(0, 3) != 0) pr[$urandom_range(0, NDIG - 1)] = 4'hA;
      convert(pr, $urandom_range(1, 16));
    end
    finish_tb();
  end
endmodule
