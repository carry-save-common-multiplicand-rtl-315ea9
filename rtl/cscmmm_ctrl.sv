// cscmmm_ctrl: control unit of the multiplier.
//
// Three states:
//   CM_IDLE  waits for load; on load the registers are filled, the
//            accumulators cleared and the counter set to i = 1.
//   CM_RUN   one cycle per iteration i = 1 .. k+2g+1. The reduction steps for
//            i <= k+2g; the accumulation, one iteration behind, for
//            i >= g+2, consuming one multiplier bit per cycle.
//   CM_CONV  one cycle per 48-bit chunk: the accumulators shift their low
//            chunks into the adders. After the last chunk finish is raised and
//            the unit returns to CM_IDLE.
// A multiplication thus takes 1 + (k+2g+1) + NCH cycles from the load edge
// until the results can be taken: 1050 + 22 = 1072 for k = 1024.
// The loop structure and the cycle totals follow the original description;
// the state encoding and the exact split of the 1050 cycles (one load cycle
// plus k+2g+1 iterations) are this design's reading of it.
module cscmmm_ctrl
  import cscmmm_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      load,
  input  logic      acc_phase,
  input  logic      run_last,
  input  logic      conv_last,
  output logic      busy,
  output logic      red_en,
  output logic      acc_en,
  output logic      conv_en,
  output logic      cnt_load_run,
  output logic      cnt_load_conv,
  output logic      cnt_inc,
  output logic      finish
);

  cm_state_e state, state_n;

  always_comb begin
    state_n       = state;
    busy          = (state != CM_IDLE);
    red_en        = 1'b0;
    acc_en        = 1'b0;
    conv_en       = 1'b0;
    cnt_load_run  = 1'b0;
    cnt_load_conv = 1'b0;
    cnt_inc       = 1'b0;
    finish        = 1'b0;
    unique case (state)
      CM_IDLE: begin
        if (load) begin
          cnt_load_run = 1'b1;
          state_n      = CM_RUN;
        end
      end
      CM_RUN: begin
        red_en = !run_last;
        acc_en = acc_phase;
        if (run_last) begin
          cnt_load_conv = 1'b1;
          state_n       = CM_CONV;
        end else begin
          cnt_inc = 1'b1;
        end
      end
      CM_CONV: begin
        conv_en = 1'b1;
        cnt_inc = 1'b1;
        if (conv_last) begin
          finish  = 1'b1;
          state_n = CM_IDLE;
        end
      end
      default: state_n = CM_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= CM_IDLE;
    else        state <= state_n;
  end

endmodule
