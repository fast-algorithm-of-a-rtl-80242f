// result_update: combines the characteristic c and the mantissa digits
// 0.m1 m2 ... into the logarithm in sign-magnitude decimal form.
//   c >= 0:           L = +(c . m)
//   c <  0, m = 0:    L = -(|c| . 0)
//   c <  0, m != 0:   L = -((|c| - 1) . (1 - 0.m))
// e.g. c = -6, m = 091 gives -5.909. The fraction 1 - 0.m is the 10's
// complement of the left-aligned mantissa over all NFRAC digits, formed by a
// borrow chain; digits behind the last computed one stay 0.
// Interface: int_d is two BCD digits of the integer part (0..16), frac_d the
// NFRAC fraction digits, most significant first at the top. Combinational.
module result_update #(
  parameter int unsigned NFRAC = 16
) (
  input  logic signed [5:0]     char_q,
  input  logic [NFRAC-1:0][3:0] mant_q,
  output logic                  neg,
  output logic [1:0][3:0]       int_d,
  output logic [NFRAC-1:0][3:0] frac_d
);
  always_comb begin
    int   mag;
    int   t;
    int   b;
    logic mzero;
    mag   = 0;
    t     = 0;
    b     = 0;
    mzero = (mant_q == '0);
    neg   = char_q < 0;
    frac_d = mant_q;
    if (!neg) begin
      mag = int'(char_q);
    end else if (mzero) begin
      mag = -int'(char_q);
    end else begin
      mag = -int'(char_q) - 1;
      for (int i = 0; i < int'(NFRAC); i++) begin
        t = 0 - int'(mant_q[i]) - b;
        if (t < 0) begin
          t = t + 10;
          b = 1;
        end else begin
          b = 0;
        end
        frac_d[i] = 4'(t);
      end
    end
    int_d[1] = (mag >= 10) ? 4'd1 : 4'd0;
    int_d[0] = 4'((mag >= 10) ? mag - 10 : mag);
  end
endmodule
