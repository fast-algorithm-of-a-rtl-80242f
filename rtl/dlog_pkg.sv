// dlog_pkg: types and constants shared by the decimal logarithm converter.
// A decimal digit is a 4-bit BCD nibble. Inside the multiplier, digits are
// kept in a redundant signed-digit form: a 5-bit two's-complement value in
// -9..9. The decimal point of an input string is the otherwise unused nibble
// value 4'hA, as the converter's interface defines.
package dlog_pkg;
  localparam int unsigned NDIG_DEF  = 16;   // digits of the data path
  localparam int unsigned NFRAC_DEF = 16;   // most mantissa digits per result
  localparam logic [3:0]  DP_CODE   = 4'hA; // decimal-point character

  typedef logic [3:0]        bcd_t;
  typedef logic signed [4:0] sd_t;

  // Control lines from the controller to the data path
  typedef struct packed {
    logic       sel_fb;    // zero-detector input: 0 = input path, 1 = power-10 result
    logic       load_a;    // store the normalised mantissa and the coefficient
    logic       p10_en;    // power-10 unit active
    logic [1:0] p10_step;  // power-10 multiplication step 0..3
  } core_ctrl_t;

  // Controller states
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,
    ST_LOAD = 2'd1,
    ST_ITER = 2'd2,
    ST_DONE = 2'd3
  } state_e;
endpackage
