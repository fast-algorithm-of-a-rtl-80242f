// tb_dec_ppg: a 6-digit partial product generator. For random and all-equal
// digit operands the 13 partial products, read as decimal numbers and added
// modulo 10^12, must give a*b, and every partial-product digit must be 0..9.
module tb_dec_ppg;
  localparam int NDIG = 6;
  localparam int W    = 2 * NDIG;
  logic [NDIG-1:0][3:0]        a, b;
  logic [2*NDIG:0][W-1:0][4:0] pp;
  dec_ppg #(.NDIG(NDIG)) dut (.a(a), .b(b), .pp(pp));

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
    longint va, vb, tot, dd;
    bit okd;
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < NDIG; i++) begin
        a[i] = 4'($urandom_range(0, 9));
        b[i] = 4'($urandom_range(0, 9));
      end
      if (n < 10) begin a = {NDIG{4'd9}}; b = {NDIG{4'(n)}}; end
      #1;
      va = 0; vb = 0;
      for (int i = NDIG - 1; i >= 0; i--) begin
        va = va * 10 + longint'(a[i]);
        vb = vb * 10 + longint'(b[i]);
      end
      tot = 0; okd = 1'b1;
      for (int k = 0; k <= 2 * NDIG; k++) begin
        dd = 0;
        for (int i = W - 1; i >= 0; i--) begin
          dd = dd * 10 + longint'($signed(pp[k][i]));
          if ($signed(pp[k][i]) < 0 || $signed(pp[k][i]) > 9) okd = 1'b0;
        end
        tot = (tot + dd) % 64'd1000000000000;
      end
      check(tot == va * vb, $sformatf("%0d * %0d: partial products sum to %0d", va, vb, tot));
      check(okd, "partial product digit out of 0..9");
    end
    finish_tb();
  end
endmodule
