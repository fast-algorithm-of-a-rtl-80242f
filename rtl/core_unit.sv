// core_unit: data path of the decimal logarithm converter.
// The input characters pass the decimal-point separator (dps), whose digits
// and decimal-point position go through a 2:1 multiplexer to the zero
// detector. The zero detector normalises the digits and, with dp_update,
// yields the coefficient: first the characteristic, then one mantissa digit
// per power-10 iteration. The normalised mantissa A is held in a_q and is
// raised to the tenth power by power10_unit; its result (mantissa of A^10 and
// decimal exponent) is the multiplexer's other input (sel_fb = 1). The
// decimal exponent of A^10 is its number of integer digits minus one, which
// is exactly the next coefficient, and re-normalising A^10 to [1,10) is the
// right shift of the algorithm, done by moving the decimal point only.
// coef_update collects the coefficients and result_update forms the
// sign-magnitude answer.
// Timing: load_a with sel_fb = 0 stores the input (characteristic); the power
// unit then runs steps 0..3 and load_a with sel_fb = 1 in step 3 stores the
// next digit and the new A in the same cycle. bad is combinational and only
// meaningful while sel_fb = 0; err_q is it, registered at the first load.
// The controller's lines arrive as one core_ctrl_t bundle.
// The block structure follows the original architecture; folding the
// characteristic and the digits into one nint - lz - 1 rule is this design's.
module core_unit
  import dlog_pkg::*;
#(
  parameter int unsigned NDIG  = NDIG_DEF,
  parameter int unsigned NFRAC = NFRAC_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NDIG-1:0][3:0]  p,
  input  core_ctrl_t            ctrl,
  output logic                  bad,
  output logic                  err_q,
  output logic signed [5:0]     char_q,
  output logic [NFRAC-1:0][3:0] mant_q,
  output logic [4:0]            nmant_q,
  output logic                  res_neg,
  output logic [1:0][3:0]       res_int,
  output logic [NFRAC-1:0][3:0] res_frac
);
  logic [NDIG-1:0][3:0] mag;
  logic [4:0]           nint_in;
  logic                 dps_bad;
  logic [NDIG-1:0][3:0] p10_y;
  logic [3:0]           p10_e;
  logic                 p10_valid;
  logic [NDIG-1:0][3:0] zd_in;
  logic [4:0]           nint;
  logic [4:0]           lz;
  logic [NDIG-1:0][3:0] norm;
  logic                 zero;
  logic signed [5:0]    coef;
  logic [NDIG-1:0][3:0] a_q;
  logic                 sel_fb, load_a, p10_en;
  logic [1:0]           p10_step;

  assign sel_fb   = ctrl.sel_fb;
  assign load_a   = ctrl.load_a;
  assign p10_en   = ctrl.p10_en;
  assign p10_step = ctrl.p10_step;

  dps #(.NDIG(NDIG)) u_dps (.p(p), .mag(mag), .nint(nint_in), .bad(dps_bad));

  // 2:1 multiplexer in front of the zero detector
  assign zd_in = sel_fb ? p10_y : mag;
  assign nint  = sel_fb ? 5'(p10_e + 4'd1) : nint_in;

  zero_detector #(.NDIG(NDIG)) u_zd (.d(zd_in), .lz(lz), .norm(norm), .zero(zero));

  dp_update u_dpu (.nint(nint), .lz(lz), .coef(coef));

  assign bad = dps_bad || zero;

  // A register: normalised mantissa in [1,10)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      err_q <= 1'b0;
    end else if (load_a) begin
      a_q <= norm;
      if (!sel_fb) err_q <= bad;
    end
  end

  power10_unit #(.NDIG(NDIG)) u_p10 (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (p10_en),
    .step (p10_step),
    .x    (a_q),
    .y    (p10_y),
    .e    (p10_e),
    .valid(p10_valid)
  );

  coef_update #(.NFRAC(NFRAC)) u_cu (
    .clk    (clk),
    .rst_n  (rst_n),
    .first  (load_a && !sel_fb),
    .next   (load_a && sel_fb),
    .coef   (coef),
    .char_q (char_q),
    .mant_q (mant_q),
    .nmant_q(nmant_q)
  );

  result_update #(.NFRAC(NFRAC)) u_ru (
    .char_q(char_q),
    .mant_q(mant_q),
    .neg   (res_neg),
    .int_d (res_int),
    .frac_d(res_frac)
  );

  // Feedback is only taken when the power unit has a result
  a_fb_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (load_a && sel_fb) |-> p10_valid);
endmodule
