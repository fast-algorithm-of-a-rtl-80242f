// coef_update: collects the coefficients of the logarithm as they come out of
// the core. On `first` it stores the characteristic (signed, from the input's
// decimal-point position) and clears the mantissa; on each `next` it writes
// the new mantissa digit (0..9) at the next position from the top, so that
// mant_q holds C-1, C-2, ... left aligned with zeros behind the last digit.
// Registers update on the rising clock edge; asynchronous active-low reset.
// The left-aligned digit register with a write pointer is this design's own
// layout.
module coef_update #(
  parameter int unsigned NFRAC = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  first,
  input  logic                  next,
  input  logic signed [5:0]     coef,
  output logic signed [5:0]     char_q,
  output logic [NFRAC-1:0][3:0] mant_q,
  output logic [4:0]            nmant_q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      char_q  <= '0;
      mant_q  <= '0;
      nmant_q <= '0;
    end else if (first) begin
      char_q  <= coef;
      mant_q  <= '0;
      nmant_q <= '0;
    end else if (next && int'(nmant_q) < int'(NFRAC)) begin
      mant_q[NFRAC-1-int'(nmant_q)] <= coef[3:0];
      nmant_q <= nmant_q + 5'd1;
    end
  end
endmodule
