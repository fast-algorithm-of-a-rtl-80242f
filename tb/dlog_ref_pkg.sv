// dlog_ref_pkg: reference model of the decimal logarithm recurrence for the
// testbenches, written with plain 128-bit integer arithmetic instead of BCD.
// A mantissa x is an integer in [10^15, 10^16) standing for x * 10^-15.
package dlog_ref_pkg;
  localparam logic [127:0] E15 = 128'd1000000000000000;
  localparam logic [127:0] E16 = 128'd10000000000000000;
  localparam logic [127:0] E31 = E16 * E15;

  // Product of two mantissas, truncated to 16 significant digits; c = 1 when
  // the product had two integer digits.
  function automatic void mul_norm(input logic [127:0] a, input logic [127:0] b,
                                   output logic [127:0] m, output int c);
    logic [127:0] pr;
    pr = a * b;
    if (pr >= E31) begin m = pr / E16; c = 1; end
    else           begin m = pr / E15; c = 0; end
  endfunction

  // Parse 16 input characters (digits, one optional point 4'hA).
  // Returns 0 for an invalid or zero input; else the characteristic, the
  // normalised mantissa and the real value.
  function automatic bit parse(input logic [63:0] p, output int chr,
                               output logic [127:0] x, output real val);
    int npt, k, lz;
    logic [127:0] v;
    real r;
    npt = 0; k = -1; chr = 0; x = 0; val = 0.0;
    for (int i = 15; i >= 0; i--) begin
      if (p[i*4 +: 4] == 4'hA) begin npt++; k = i; end
      else if (p[i*4 +: 4] > 4'd9) return 0;
    end
    if (npt > 1) return 0;
    v = 0; r = 0.0;
    for (int i = 15; i >= 0; i--) begin
      if (i != k) begin
        v = v * 10 + 128'(p[i*4 +: 4]);
        r = r * 10.0 + real'(p[i*4 +: 4]);
      end
    end
    if (v == 0) return 0;
    if (k >= 0) r = r / (10.0 ** k);
    val = r;
    lz = 0;
    x = v;
    while (x < E15) begin x = x * 10; lz++; end
    // v has 15 digits with a point (k after-point digits), 16 without
    chr = (k >= 0) ? (15 - k) - lz - 1 + 1 : 16 - lz - 1;
    return 1;
  endfunction

  // One iteration: x <- mantissa of x^10, returns the decimal exponent of x^10
  function automatic int digit(inout logic [127:0] x);
    logic [127:0] x2, x4, x8, x10;
    int c1, c2, c3, c4;
    mul_norm(x, x, x2, c1);
    mul_norm(x2, x2, x4, c2);
    mul_norm(x4, x4, x8, c3);
    mul_norm(x8, x2, x10, c4);
    x = x10;
    return 5 * c1 + 2 * c2 + c3 + c4;
  endfunction

  // BCD digits (16) of a mantissa
  function automatic logic [63:0] to_bcd(input logic [127:0] x);
    logic [63:0] r;
    for (int i = 0; i < 16; i++) begin
      r[i*4 +: 4] = 4'(x % 10);
      x = x / 10;
    end
    return r;
  endfunction

  function automatic logic [127:0] from_bcd(input logic [63:0] d);
    logic [127:0] r;
    r = 0;
    for (int i = 15; i >= 0; i--) r = r * 10 + 128'(d[i*4 +: 4]);
    return r;
  endfunction
endpackage
