// power10_unit: raises a normalised decimal mantissa X (1 <= X < 10, NDIG
// digits, decimal point after the leading digit) to the tenth power in four
// clock cycles with one combinational multiplier, by recursive squaring:
//   step 0: X * X      -> X^2  (stored in the accumulator and in the X^2 latch)
//   step 1: acc * acc  -> X^4
//   step 2: acc * acc  -> X^8
//   step 3: acc * X^2  -> X^10 (Sel = 1: second operand is the latch)
// After each multiplication only the most significant NDIG digits of the
// 2*NDIG digit product are kept (truncation), so every intermediate value is
// again a normalised mantissa; dp_accumulator adds up where the decimal point
// went. At step 3 the outputs are combinational from the multiplier: y is the
// mantissa of X^10 and e its exponent, X^10 ~= y * 10^e, valid while
// valid = 1. The caller holds x stable only during step 0.
// The four-step schedule and the X^2 latch follow the original architecture;
// the latch is an edge-triggered register here, and the operand multiplexers
// are steered by en/step from the controller.
module power10_unit #(
  parameter int unsigned NDIG = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [1:0]           step,
  input  logic [NDIG-1:0][3:0] x,
  output logic [NDIG-1:0][3:0] y,
  output logic [3:0]           e,
  output logic                 valid
);
  logic [NDIG-1:0][3:0]   acc_q;   // accumulator
  logic [NDIG-1:0][3:0]   sq_q;    // X^2 latch
  logic [NDIG-1:0][3:0]   op_a;
  logic [NDIG-1:0][3:0]   op_b;
  logic [2*NDIG-1:0][3:0] prod;
  logic [NDIG-1:0][3:0]   norm;
  logic                   c;
  logic                   sel;

  // Operand selection: A*A for steps 0..2, A*B (B = X^2) for step 3
  assign sel  = (step == 2'd3);
  assign op_a = (step == 2'd0) ? x : acc_q;
  assign op_b = (step == 2'd0) ? x : (sel ? sq_q : acc_q);

  dec_mult #(.NDIG(NDIG)) u_mult (.a(op_a), .b(op_b), .p(prod));

  // Keep the top NDIG significant digits of a product in [1,100)
  assign c    = (prod[2*NDIG-1] != 4'd0);
  assign norm = c ? prod[2*NDIG-1:NDIG] : prod[2*NDIG-2:NDIG-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
      sq_q  <= '0;
    end else if (en) begin
      acc_q <= norm;
      if (step == 2'd0) sq_q <= norm;
    end
  end

  dp_accumulator u_dpacc (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .step (step),
    .c    (c),
    .e10  (e)
  );

  assign y     = norm;
  assign valid = en && sel;
endmodule
