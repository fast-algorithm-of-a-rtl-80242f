// tb_error_analysis: accuracy sweep of the converter at its default size.
// 100 random positive 16-digit integers (plus a few values below one, with a
// decimal point) are converted with 4, 8, 12, 14 and 16 mantissa digits. For
// each precision the absolute error against $ln(P)/$ln(10) is measured; the
// result is a truncation, so it must lie in [-1e-13, 10^-i + 1e-13]. The
// largest error per precision is printed.
module tb_error_analysis;
  logic              clk = 1'b0;
  logic              rst_n, start;
  logic [63:0]       p_in;
  logic [4:0]        i_in;
  logic              busy, done, err;
  logic signed [5:0] res_char;
  logic [63:0]       res_mant;
  logic              res_neg;
  logic [7:0]        res_int;
  logic [63:0]       res_frac;

  dec_log64 dut (.*);
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

  // value of a character string (digits with an optional point 4'hA)
  function automatic real value(input logic [63:0] p);
    real r;
    int k;
    r = 0.0; k = -1;
    for (int i = 15; i >= 0; i--) begin
      if (p[i*4 +: 4] == 4'hA) k = i;
      else r = r * 10.0 + real'(p[i*4 +: 4]);
    end
    if (k >= 0) r = r / (10.0 ** k);
    return r;
  endfunction

  initial begin
    int prec [5] = '{4, 8, 12, 14, 16};
    real maxerr [5];
    real lhw, ltrue, e;
    logic [63:0] vec [110];
    logic [15:0][3:0] m;
    for (int n = 0; n < 110; n++) begin
      for (int i = 0; i < 16; i++) vec[n][i*4 +: 4] = 4'($urandom_range(0, 9));
      vec[n][63:60] = 4'($urandom_range(1, 9));
      if (n >= 100) vec[n][63:56] = 8'h0A;   // 0.xxxxxxxxxxxxxx
    end
    rst_n = 1'b0; start = 1'b0; p_in = '0; i_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int q = 0; q < 5; q++) begin
      maxerr[q] = 0.0;
      for (int n = 0; n < 110; n++) begin
        @(negedge clk);
        p_in = vec[n]; i_in = 5'(prec[q]); start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        while (!done) @(negedge clk);
        m = res_mant;
        lhw = real'(res_char);
        for (int j = 0; j < 16; j++) lhw = lhw + real'(m[15-j]) * (10.0 ** (-(j + 1)));
        ltrue = $ln(value(vec[n])) / $ln(10.0);
        e = ltrue - lhw;
        check(!err && e > -1e-13 && e < (10.0 ** (-prec[q])) + 1e-13,
              $sformatf("P=%h i=%0d error %e", vec[n], prec[q], e));
        if (e < 0) e = -e;
        if (e > maxerr[q]) maxerr[q] = e;
      end
      $display("precision %0d digits: max abs error %e", prec[q], maxerr[q]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
