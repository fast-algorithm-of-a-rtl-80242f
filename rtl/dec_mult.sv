// dec_mult: NDIG x NDIG digit combinational BCD multiplier (2*NDIG digit
// product). Three stages, in the order the design prescribes:
//   1. dec_ppg recodes the multiplier digits into {0,5,10} + {-2..2} and forms
//      2*NDIG+1 partial products from the multiples a, 2a, 5a, 10a;
//   2. sd_adder_tree adds them in redundant signed-digit form, carry-free;
//   3. sd_to_bcd turns the signed-digit sum into BCD with one borrow chain.
// Interface: a, b, NDIG BCD digits each, digit 0 least significant; p is the
// exact product. Purely combinational. The three-stage structure follows the
// original architecture; the tree shape is this design's own.
module dec_mult #(
  parameter int unsigned NDIG = 16
) (
  input  logic [NDIG-1:0][3:0]   a,
  input  logic [NDIG-1:0][3:0]   b,
  output logic [2*NDIG-1:0][3:0] p
);
  localparam int unsigned W   = 2 * NDIG;
  localparam int unsigned NPP = 2 * NDIG + 1;

  logic [NPP-1:0][W-1:0][4:0] pp;
  logic [W-1:0][4:0]          sd_sum;

  dec_ppg       #(.NDIG(NDIG))       u_ppg  (.a(a), .b(b), .pp(pp));
  sd_adder_tree #(.N(NPP), .W(W))    u_tree (.ops(pp), .sum(sd_sum));
  sd_to_bcd     #(.W(W))             u_cpa  (.v(sd_sum), .d(p));
endmodule
