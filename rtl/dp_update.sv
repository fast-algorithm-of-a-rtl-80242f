// dp_update: tracks the decimal point of the value in the core and turns it
// into the next coefficient of the logarithm. For a value whose digit string
// has nint digits left of the point and lz leading zeros, the leading
// non-zero digit sits at 10^(nint - lz - 1); that exponent is the coefficient
// (the characteristic for the input, 0..9 for every later power of ten), and
// the right shift that brings the value back to [1,10) is just moving the
// point to after the leading digit, which the normalised register does.
// Interface: unsigned nint, lz; signed 6-bit coef. Combinational.
module dp_update (
  input  logic [4:0]        nint,
  input  logic [4:0]        lz,
  output logic signed [5:0] coef
);
  assign coef = $signed({1'b0, nint}) - $signed({1'b0, lz}) - 6'sd1;
endmodule
