// sd_to_bcd: converts a signed-digit decimal number (digits -9..9) to BCD.
// This is the carry-propagate stage at the end of the multiplier: a ripple
// borrow chain adds 10 to each negative position and borrows one from the next.
// The result is the value modulo 10^W (the final borrow is dropped), which
// is exact whenever the true value fits in W digits and is non-negative.
// Interface: v is W signed digits (5-bit two's complement, digit 0 least
// significant); d is W BCD digits. Purely combinational. A final
// carry-propagate conversion is part of the original architecture; the simple
// ripple structure is this design's own.
module sd_to_bcd #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0][4:0] v,
  output logic [W-1:0][3:0] d
);
  always_comb begin
    int t;
    int b;
    b = 0;
    for (int i = 0; i < int'(W); i++) begin
      t = int'($signed(v[i])) + b;
      if (t < 0) begin
        d[i] = 4'(t + 10);
        b    = -1;
      end else begin
        d[i] = 4'(t);
        b    = 0;
      end
    end
  end
endmodule
