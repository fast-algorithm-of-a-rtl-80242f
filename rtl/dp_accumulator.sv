// dp_accumulator: tracks the decimal exponent (position of the decimal point)
// of the partial powers inside the power-10 unit. Every product of two
// normalised mantissas (each in [1,10)) lies in [1,100); the multiplier
// normalises it and reports c = 1 when it had two integer digits. With
// exp(X) = 0 the exponents follow
//   step 0: X^2  -> e = c          (also kept as e2 for the last step)
//   step 1: X^4  -> e = 2e + c
//   step 2: X^8  -> e = 2e + c
//   step 3: X^10 -> e10 = e + e2 + c   (combinational, not stored)
// e10 (0..9) is the number of integer digits of A^10 minus one, i.e. the
// next mantissa coefficient of the logarithm.
// Interface: en/step come from the controller; c from the multiplier's
// normaliser in the same cycle. Registers update on the rising clock edge.
module dp_accumulator (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [1:0] step,
  input  logic       c,
  output logic [3:0] e10
);
  logic [3:0] e_q;
  logic [3:0] e2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_q  <= '0;
      e2_q <= '0;
    end else if (en) begin
      unique case (step)
        2'd0: begin
          e_q  <= {3'd0, c};
          e2_q <= {3'd0, c};
        end
        2'd1, 2'd2: e_q <= {e_q[2:0], c};   // 2e + c
        default: ;
      endcase
    end
  end

  assign e10 = e_q + e2_q + {3'd0, c};
endmodule
