// dec_ppg: partial product generator of the NDIG x NDIG digit BCD multiplier.
// Every multiplier digit b_j is recoded as b_j = h_j + l_j with
// h_j in {0, 5, 10} and l_j in {-2, -1, 0, 1, 2}. Only four multiples of the
// multiplicand a are needed:
//   2a: each digit is doubled into a (carry, digit) pair; the carry is added
//       to the next digit, which is even, so the addition never carries on.
//   5a: formed as 10a / 2: digit i = 5*(a_i odd) + floor(a_{i-1} / 2).
//   a and 10a (a one-digit shift).
// For each j the h-product (0, 5a or 10a) and the l-product (0, a or 2a,
// 9's-complemented over the whole width when l_j < 0) are placed at digit j of
// a W = 2*NDIG digit field. The "+1" that completes each 10's complement is
// collected into one extra operand whose digit j is 1 when l_j < 0. Summing
// all 2*NDIG+1 operands modulo 10^W gives a*b exactly.
// Interface: a, b are NDIG BCD digits (digit 0 least significant);
// pp[k][i] is digit i of operand k as a signed digit (all values here 0..9):
// operands 0..NDIG-1 are the h-products, NDIG..2*NDIG-1 the l-products,
// 2*NDIG the complement correction. Combinational.
// The recoding, the carry-free 2a and 5a and the 10's complements follow the
// original architecture; gathering the "+1"s into one operand is this
// design's own arrangement.
module dec_ppg #(
  parameter int unsigned NDIG = 16
) (
  input  logic [NDIG-1:0][3:0]                 a,
  input  logic [NDIG-1:0][3:0]                 b,
  output logic [2*NDIG:0][2*NDIG-1:0][4:0]     pp
);
  localparam int unsigned W = 2 * NDIG;

  logic [NDIG:0][3:0] m1, m2, m5;   // a, 2a, 5a with one extra digit

  // Multiples of a, carry-free
  always_comb begin
    logic [NDIG-1:0]      dcy;
    logic [NDIG-1:0][3:0] ddg;
    for (int i = 0; i < int'(NDIG); i++) begin
      dcy[i] = (a[i] >= 4'd5);
      ddg[i] = dcy[i] ? 4'(2 * a[i] - 10) : 4'(2 * a[i]);
    end
    m1 = {4'd0, a};
    for (int i = 0; i <= int'(NDIG); i++) begin
      // 2a
      if (i == int'(NDIG))  m2[i] = {3'd0, dcy[NDIG-1]};
      else if (i == 0)      m2[i] = ddg[0];
      else                  m2[i] = ddg[i] + {3'd0, dcy[i-1]};
      // 5a = 10a / 2
      m5[i] = ((i < int'(NDIG) && a[i][0]) ? 4'd5 : 4'd0)
            + ((i > 0) ? {1'b0, a[i-1][3:1]} : 4'd0);
    end
  end

  always_comb begin
    int                 h;
    int                 l;
    logic [NDIG:0][3:0] lm;
    logic [W-1:0][3:0]  row;
    pp = '0;
    for (int j = 0; j < int'(NDIG); j++) begin
      // Recode b_j = h + l
      case (b[j])
        4'd0: begin h = 0;  l = 0;  end
        4'd1: begin h = 0;  l = 1;  end
        4'd2: begin h = 0;  l = 2;  end
        4'd3: begin h = 5;  l = -2; end
        4'd4: begin h = 5;  l = -1; end
        4'd5: begin h = 5;  l = 0;  end
        4'd6: begin h = 5;  l = 1;  end
        4'd7: begin h = 5;  l = 2;  end
        4'd8: begin h = 10; l = -2; end
        default: begin h = 10; l = -1; end
      endcase
      // h-product: 5a at digit j, or a at digit j+1 (= 10a at digit j)
      row = '0;
      for (int i = 0; i <= int'(NDIG); i++) begin
        if (h == 5 && j + i < int'(W))
          row[j+i] = m5[i];
        else if (h == 10 && j + 1 + i < int'(W))
          row[j+1+i] = m1[i];
      end
      for (int i = 0; i < int'(W); i++) pp[j][i] = {1'b0, row[i]};
      // l-product: |l|*a at digit j, 9's-complemented upward when l < 0
      lm  = (l == 2 || l == -2) ? m2 : m1;
      row = '0;
      if (l != 0) begin
        for (int i = 0; i < int'(W); i++) begin
          if (i >= j) begin
            row[i] = (i - j <= int'(NDIG)) ? lm[i-j] : 4'd0;
            if (l < 0) row[i] = 4'd9 - row[i];
          end
        end
      end
      for (int i = 0; i < int'(W); i++) pp[NDIG+j][i] = {1'b0, row[i]};
      // 10's-complement correction
      pp[2*NDIG][j] = (l < 0) ? 5'd1 : 5'd0;
    end
  end
endmodule
