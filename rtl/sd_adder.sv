// sd_adder: carry-free signed-digit decimal adder.
// Each position forms u_i = x_i + y_i (-18..18), a transfer
// c_i = +1 if u_i > 1, -1 if u_i < -1, else 0, and the sum digit
// s_i = u_i - 10*c_i + c_{i-1}, which always lies in -9..9, so no carry
// ever travels more than one position. The rule is the original
// architecture's; it is used in the multiplier's reduction tree. The transfer out of the top digit is
// dropped: the adder works modulo 10^W, which is what the 10's-complement
// partial products need.
// Interface: x, y, s are W signed digits, 5-bit two's complement each, digit
// 0 least significant. Purely combinational.
module sd_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0][4:0] x,
  input  logic [W-1:0][4:0] y,
  output logic [W-1:0][4:0] s
);
  logic signed [5:0] u [W];   // position sum, -18..18
  logic signed [1:0] c [W];   // transfer, -1..1

  for (genvar i = 0; i < int'(W); i++) begin : g_dig
    assign u[i] = $signed(x[i]) + $signed(y[i]);
    assign c[i] = (u[i] > 6'sd1) ? 2'sd1 : ((u[i] < -6'sd1) ? -2'sd1 : 2'sd0);
    if (i == 0) begin : g_lsd
      assign s[i] = 5'(u[i] - 6'sd10 * c[i]);
    end else begin : g_rest
      assign s[i] = 5'(u[i] - 6'sd10 * c[i] + c[i-1]);
    end
  end
endmodule
