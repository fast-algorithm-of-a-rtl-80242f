// dps: decimal-point separator. The converter's input is NDIG characters of 4
// bits, BCD digits 0..9 plus at most one decimal-point character 4'hA.
// dps finds the decimal point, removes it by closing the gap, and returns:
//   mag  - the NDIG-1 (or NDIG, with no point) digits, right aligned, zero
//          padded at the top;
//   nint - how many digits of mag lie left of the decimal point (the top pad
//          digit counts as one): NDIG - k for a point at character k, NDIG when
//          there is no point (integer input);
//   bad  - a character 4'hB..4'hF, or more than one point.
// Which characters are rejected is this design's own choice. Combinational.
module dps
  import dlog_pkg::*;
#(
  parameter int unsigned NDIG = 16
) (
  input  logic [NDIG-1:0][3:0] p,
  output logic [NDIG-1:0][3:0] mag,
  output logic [4:0]           nint,
  output logic                 bad
);
  always_comb begin
    int npt;
    int k;
    logic found;
    npt   = 0;
    k     = 0;
    found = 1'b0;
    bad   = 1'b0;
    for (int i = 0; i < int'(NDIG); i++) begin
      if (p[i] == DP_CODE) begin
        npt = npt + 1;
        if (!found) k = i;
        found = 1'b1;
      end else if (p[i] > 4'd9) begin
        bad = 1'b1;
      end
    end
    if (npt > 1) bad = 1'b1;
    mag = '0;
    if (found) begin
      for (int i = 0; i < int'(NDIG); i++) begin
        if (i < k)                         mag[i]   = p[i];
        else if (i > k && i - 1 >= 0)      mag[i-1] = p[i];
      end
      nint = 5'(int'(NDIG) - k);
    end else begin
      mag  = p;
      nint = 5'(NDIG);
    end
  end
endmodule
