// log_controller: sequences one logarithm conversion.
//   IDLE: wait for start; on start capture the inputs (reg_load).
//   LOAD: one cycle; the input goes through the decimal-point separator and
//         zero detector (sel_fb = 0) and load_a stores the normalised
//         mantissa and the characteristic. Skips to DONE if no mantissa digit
//         is wanted or the input is invalid (inval).
//   ITER: power-10 steps 0..3 (p10_en, p10_step). In step 3 the multiplier's
//         result is fed back (sel_fb = 1), load_a stores the new mantissa and
//         coefficient and the counter is decremented; the next iteration
//         starts at once, or DONE follows after the last digit.
//   DONE: done is high for one cycle; the result stays until the next start.
// So a conversion with i digits takes 1 + 4*i cycles from the start edge to
// done. sel_fb, load_a, p10_en and p10_step leave as the fields of the ctrl
// bundle (core_ctrl_t). The load/iterate/stop-at-zero sequence follows the
// original architecture; encoding and the handshake are this design's own.
module log_controller
  import dlog_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       inval,
  input  logic       cnt_zero,
  input  logic       cnt_last,
  output logic       reg_load,
  output logic       cnt_dec,
  output core_ctrl_t ctrl,
  output logic       busy,
  output logic       done
);
  state_e     st_q, st_d;
  logic       sel_fb, load_a, p10_en;
  logic [1:0] step_q, step_d;

  always_comb begin
    st_d     = st_q;
    step_d   = step_q;
    reg_load = 1'b0;
    sel_fb   = 1'b0;
    load_a   = 1'b0;
    cnt_dec  = 1'b0;
    p10_en   = 1'b0;
    unique case (st_q)
      ST_IDLE: begin
        if (start) begin
          reg_load = 1'b1;
          st_d     = ST_LOAD;
        end
      end
      ST_LOAD: begin
        load_a = 1'b1;
        step_d = 2'd0;
        st_d   = (cnt_zero || inval) ? ST_DONE : ST_ITER;
      end
      ST_ITER: begin
        p10_en = 1'b1;
        step_d = step_q + 2'd1;
        if (step_q == 2'd3) begin
          sel_fb  = 1'b1;
          load_a  = 1'b1;
          cnt_dec = 1'b1;
          if (cnt_last) st_d = ST_DONE;
        end
      end
      ST_DONE: st_d = ST_IDLE;
      default: st_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= ST_IDLE;
      step_q <= 2'd0;
    end else begin
      st_q   <= st_d;
      step_q <= step_d;
    end
  end

  assign ctrl.sel_fb   = sel_fb;
  assign ctrl.load_a   = load_a;
  assign ctrl.p10_en   = p10_en;
  assign ctrl.p10_step = step_q;
  assign busy     = (st_q != ST_IDLE);
  assign done     = (st_q == ST_DONE);

  // The iteration counter must not already be empty while iterating
  a_cnt_ok: assert property (@(posedge clk) disable iff (!rst_n)
    (st_q == ST_ITER) |-> !cnt_zero);
  // done lasts exactly one cycle
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    done |=> !done);
endmodule
