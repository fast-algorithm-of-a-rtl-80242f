// tb_dec_log64: end-to-end test of the decimal logarithm converter at its
// default size (16 digits). A reference model in the testbench parses the
// input characters, then runs the same digit recurrence with plain 128-bit
// integer arithmetic: each power of ten is X^2, X^4, X^8, X^8*X^2, keeping
// the top 16 digits of every product. The reference digits must match the
// hardware exactly; in addition the result is compared with $log10 of the
// input (it must lie within 10^-i below the true value). Also checked: the
// two worked examples (+8.091, -5.909), the sign-magnitude result, the
// latency of 1 + 4*i cycles, error inputs, clamping of i, and that a start
// while busy is ignored. Each mechanism is counted and must occur.
module tb_dec_log64;
  import dlog_ref_pkg::*;
  localparam int NDIG  = 16;
  localparam int NFRAC = 16;

  logic                 clk = 1'b0;
  logic                 rst_n;
  logic                 start;
  logic [NDIG*4-1:0]    p_in;
  logic [4:0]           i_in;
  logic                 busy, done, err;
  logic signed [5:0]    res_char;
  logic [NFRAC*4-1:0]   res_mant;
  logic                 res_neg;
  logic [7:0]           res_int;
  logic [NFRAC*4-1:0]   res_frac;

  dec_log64 dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_neg = 0, n_pos = 0, n_int_in = 0, n_i0 = 0, n_err = 0, n_clamp = 0;
  int n_bigdig = 0, n_busy_ignored = 0, n_backtoback = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- stimulus ----------------
  task automatic run(input logic [NDIG*4-1:0] p, input int ireq, input string tag,
                     input bit expect_known = 0, input int exp_sign = 0,
                     input logic [7:0] exp_int = '0, input logic [NFRAC*4-1:0] exp_frac = '0);
    int cyc, chr, ieff, d;
    logic [127:0] x;
    real val, lhw;
    bit ok;
    logic [NFRAC-1:0][3:0] mant, fr;
    ieff = (ireq > NFRAC) ? NFRAC : ireq;
    if (ireq > NFRAC) n_clamp++;
    @(negedge clk);
    p_in = p; i_in = 5'(ireq); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;   // edges after the start edge
    // a start while busy must be ignored
    if (ieff >= 1 && ($urandom_range(0, 3) == 0)) begin
      p_in = ~p; i_in = 5'd1; start = 1'b1;
      @(negedge clk);
      start = 1'b0; p_in = p;
      cyc++;
      n_busy_ignored++;
    end
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    ok = parse(p, chr, x, val);
    check(err == !ok, $sformatf("%s err=%0d expected %0d", tag, err, !ok));
    if (!ok) begin
      n_err++;
      check(cyc == 1, $sformatf("%s error latency %0d", tag, cyc));
      return;
    end
    check(cyc == 1 + 4 * ieff, $sformatf("%s latency %0d expected %0d", tag, cyc, 1 + 4 * ieff));
    if (ieff == 0) n_i0++;
    check(res_char == 6'(chr), $sformatf("%s char %0d expected %0d", tag, res_char, chr));
    mant = res_mant;
    for (int j = 0; j < NFRAC; j++) begin
      if (j < ieff) begin
        d = digit(x);
        if (d > 0) n_bigdig++;
        check(mant[NFRAC-1-j] == 4'(d), $sformatf("%s digit %0d = %0d expected %0d", tag, j + 1, mant[NFRAC-1-j], d));
      end else begin
        check(mant[NFRAC-1-j] == 4'd0, $sformatf("%s unused digit %0d not 0", tag, j + 1));
      end
    end
    // value of the signed-magnitude result against $log10
    fr = res_frac;
    lhw = real'(res_int[7:4]) * 10.0 + real'(res_int[3:0]);
    for (int j = 0; j < NFRAC; j++) lhw = lhw + real'(fr[NFRAC-1-j]) * (10.0 ** (-(j + 1)));
    if (res_neg) lhw = -lhw;
    check(($ln(val) / $ln(10.0) - lhw) > -1e-9 && ($ln(val) / $ln(10.0) - lhw) < (10.0 ** (-ieff)) + 1e-9,
          $sformatf("%s log %f vs hw %f", tag, $ln(val) / $ln(10.0), lhw));
    check(res_neg == (chr < 0), $sformatf("%s sign", tag));
    if (chr < 0) n_neg++; else n_pos++;
    if (expect_known) begin
      check(res_neg == exp_sign[0] && res_int == exp_int && res_frac == exp_frac,
            $sformatf("%s known result %s%h.%h", tag, res_neg ? "-" : "+", res_int, res_frac));
    end
  endtask

  function automatic logic [NDIG*4-1:0] rand_input(output bit has_int);
    logic [NDIG-1:0][3:0] c;
    int k, lzc;
    k   = $urandom_range(0, NDIG);        // NDIG: no decimal point
    lzc = $urandom_range(0, NDIG - 1);
    for (int i = 0; i < NDIG; i++) c[i] = 4'($urandom_range(0, 9));
    for (int i = NDIG - 1; i >= NDIG - lzc; i--) c[i] = 4'd0;
    if (k < NDIG) c[k] = 4'hA;
    has_int = (k == NDIG);
    return c;
  endfunction

  initial begin
    bit hi;
    logic [NDIG*4-1:0] p;
    rst_n = 1'b0; start = 1'b0; p_in = '0; i_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Worked examples: 123456789.123456 -> 8.091, 0.00000123456789 -> -5.909
    run(64'h123456789A123456, 3, "example1", 1, 0, 8'h08, {16'h0910, 48'h0});
    run(64'h0A00000123456789, 3, "example2", 1, 1, 8'h05, {16'h9090, 48'h0});
    // Powers of ten and an integer input
    run(64'h0000000000001000, 5, "1000", 1, 0, 8'h03, '0);
    run(64'h0000000000000001, 4, "one", 1, 0, 8'h00, '0);
    run(64'hA000000000000001, 6, "1e-15", 1, 1, 8'h15, '0);
    run(64'h9999999999999999, 16, "max");
    run(64'h0000000000000002, 12, "two");
    // Invalid inputs
    run(64'h000000000000A000, 3, "zero");
    run(64'h12A45A7800000000, 3, "two points");
    run(64'h00000000000000F1, 3, "bad digit");
    // i = 0 and i clamped
    run(64'h000000000000A314, 0, "i0");
    run(64'h0000000000000314, 25, "clamp");
    // Random inputs, back to back
    for (int n = 0; n < 60; n++) begin
      p = rand_input(hi);
      if (hi) n_int_in++;
      run(p, $urandom_range(0, 16), $sformatf("rand%0d", n));
      n_backtoback++;
    end
    $display("mechanisms: pos=%0d neg=%0d int_input=%0d i0=%0d err=%0d clamp=%0d digit>0=%0d busy_ignored=%0d",
             n_pos, n_neg, n_int_in, n_i0, n_err, n_clamp, n_bigdig, n_busy_ignored);
    check(n_pos > 0, "positive log never seen");
    check(n_neg > 0, "negative log never seen");
    check(n_int_in > 0, "input without decimal point never seen");
    check(n_i0 > 0, "i = 0 never seen");
    check(n_err > 0, "invalid input never seen");
    check(n_clamp > 0, "i clamp never seen");
    check(n_bigdig > 0, "non-zero mantissa digit never seen");
    check(n_busy_ignored > 0, "start while busy never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
