// reg_counter: the synchronous register-counter at the converter's input. On
// `load` it captures the input characters p_in and the requested number of
// mantissa digits i_in (clamped to NFRAC) and presets the iteration down
// counter to that number; each `dec` counts one finished iteration. zero and
// last (counter = 1) tell the controller when to stop.
// Registers update on the rising clock edge; asynchronous active-low reset.
// The register-counter follows the original architecture; the clamp of i is
// this design's own.
module reg_counter
  import dlog_pkg::*;
#(
  parameter int unsigned NDIG  = NDIG_DEF,
  parameter int unsigned NFRAC = NFRAC_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic                 dec,
  input  logic [NDIG-1:0][3:0] p_in,
  input  logic [4:0]           i_in,
  output logic [NDIG-1:0][3:0] p_q,
  output logic [4:0]           i_q,
  output logic [4:0]           cnt_q,
  output logic                 zero,
  output logic                 last
);
  logic [4:0] i_clamp;
  assign i_clamp = (int'(i_in) > int'(NFRAC)) ? 5'(NFRAC) : i_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_q   <= '0;
      i_q   <= '0;
      cnt_q <= '0;
    end else if (load) begin
      p_q   <= p_in;
      i_q   <= i_clamp;
      cnt_q <= i_clamp;
    end else if (dec && cnt_q != 5'd0) begin
      cnt_q <= cnt_q - 5'd1;
    end
  end

  assign zero = (cnt_q == 5'd0);
  assign last = (cnt_q == 5'd1);
endmodule
