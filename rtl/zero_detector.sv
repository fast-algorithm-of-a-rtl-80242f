// zero_detector: counts the leading zero digits of an NDIG digit value and
// shifts the value left by that count so that its leading digit is non-zero
// (normalised mantissa). zero is set when every digit is 0 (lz = NDIG).
// Together with the decimal-point position this gives the number of integer
// digits of the value, which is the next coefficient of the logarithm.
// Combinational: a priority scan followed by a digit barrel shifter.
// The block's role follows the original architecture; its insides are this
// design's own.
module zero_detector #(
  parameter int unsigned NDIG = 16
) (
  input  logic [NDIG-1:0][3:0] d,
  output logic [4:0]           lz,
  output logic [NDIG-1:0][3:0] norm,
  output logic                 zero
);
  always_comb begin
    int n;
    logic hit;
    n   = 0;
    hit = 1'b0;
    for (int i = int'(NDIG) - 1; i >= 0; i--) begin
      if (!hit && d[i] == 4'd0) n = n + 1;
      if (d[i] != 4'd0) hit = 1'b1;
    end
    lz   = 5'(n);
    zero = !hit;
    norm = '0;
    for (int i = 0; i < int'(NDIG); i++) begin
      if (i - n >= 0) norm[i] = d[i-n];
    end
  end
endmodule
