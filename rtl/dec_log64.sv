// dec_log64: 64-bit decimal logarithm converter, top level.
// It computes L = log10(P) digit by digit without tables or division. P is
// given as NDIG 4-bit characters (BCD digits with at most one decimal point
// character 4'hA); the characteristic of L comes from the position of P's
// leading digit, and each further digit is the decimal exponent of A^10,
// where A is the current mantissa in [1,10) and is replaced by the
// normalised A^10 after each step.
// Structure: reg_counter (input registers, iteration down counter),
// log_controller (sequencing) and core_unit (data path with the power-10
// unit and its combinational BCD multiplier).
// Interface: pulse start while busy = 0 with p_in and i_in (mantissa digits
// wanted, 0..NFRAC, larger values clamped). done pulses 1 + 4*i cycles after
// the start edge; res_* and err then hold until the next start.
//   res_char/res_mant: L = res_char + 0.res_mant (characteristic, digits)
//   res_neg/res_int/res_frac: the same value in sign-magnitude BCD
//   err: P is zero or not a valid digit string; res_* are then meaningless.
// The digit recurrence, the split into register-counter, controller and core,
// and the four-cycle power unit follow the original architecture; the
// handshake, the error flag and the sign-magnitude result are this design's
// own.
module dec_log64
  import dlog_pkg::*;
#(
  parameter int unsigned NDIG  = NDIG_DEF,
  parameter int unsigned NFRAC = NFRAC_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [NDIG*4-1:0]     p_in,
  input  logic [4:0]            i_in,
  output logic                  busy,
  output logic                  done,
  output logic                  err,
  output logic signed [5:0]     res_char,
  output logic [NFRAC*4-1:0]    res_mant,
  output logic                  res_neg,
  output logic [7:0]            res_int,
  output logic [NFRAC*4-1:0]    res_frac
);
  logic                  reg_load, cnt_dec;
  core_ctrl_t            ctrl;
  logic                  cnt_zero, cnt_last, bad;
  logic [NDIG-1:0][3:0]  p_q;
  logic [4:0]            i_q, cnt_q, nmant;
  logic [NFRAC-1:0][3:0] mant, frac;
  logic [1:0][3:0]       int_d;

  reg_counter #(.NDIG(NDIG), .NFRAC(NFRAC)) u_regcnt (
    .clk  (clk),
    .rst_n(rst_n),
    .load (reg_load),
    .dec  (cnt_dec),
    .p_in (p_in),
    .i_in (i_in),
    .p_q  (p_q),
    .i_q  (i_q),
    .cnt_q(cnt_q),
    .zero (cnt_zero),
    .last (cnt_last)
  );

  log_controller u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .inval   (bad),
    .cnt_zero(cnt_zero),
    .cnt_last(cnt_last),
    .reg_load(reg_load),
    .cnt_dec (cnt_dec),
    .ctrl    (ctrl),
    .busy    (busy),
    .done    (done)
  );

  core_unit #(.NDIG(NDIG), .NFRAC(NFRAC)) u_core (
    .clk     (clk),
    .rst_n   (rst_n),
    .p       (p_q),
    .ctrl    (ctrl),
    .bad     (bad),
    .err_q   (err),
    .char_q  (res_char),
    .mant_q  (mant),
    .nmant_q (nmant),
    .res_neg (res_neg),
    .res_int (int_d),
    .res_frac(frac)
  );

  assign res_mant = mant;
  assign res_frac = frac;
  assign res_int  = int_d;

  // The number of digits written equals the number requested
  a_ndig: assert property (@(posedge clk) disable iff (!rst_n)
    (done && !err) |-> (nmant == i_q));
  // The counter is empty when the conversion ends
  a_cnt_end: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> (cnt_zero || err) && cnt_q <= i_q);
endmodule
