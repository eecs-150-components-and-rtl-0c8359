// Controller of the linked-list summing processor.
//
// A four-state machine. START (in any state) performs the initialisation
// NEXT <- 0, SUM <- 0, NUMA <- 1 in the cycle it is high and leads to
// COMPUTE_SUM. COMPUTE_SUM reads Memory[NUMA] and loads SUM <- SUM + number;
// GET_NEXT reads Memory[NEXT] and loads NEXT <- pointer, NUMA <- pointer + 1.
// GET_NEXT goes back to COMPUTE_SUM unless the new pointer is zero
// (next_zero), in which case the machine enters DONE and holds DONE high until
// the next START. Each list element thus costs two cycles.
//
// The outputs are Moore outputs of the state, except that START overrides
// them with the initialisation. Reset (synchronous, this design's addition)
// enters IDLE with DONE low. COMPUTE_SUM, GET_NEXT and the two cycles per
// element follow the design; IDLE, DONE and START handling are local choices.
module lp_controller
  import rtl150_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     start,
  input  logic     next_zero,
  output lp_ctrl_t ctrl,
  output logic     done,
  output lp_state_e state
);

  lp_state_e state_n;

  always_comb begin
    ctrl    = '0;
    state_n = state;
    if (start) begin
      // NEXT <- 0, NUMA <- 1, SUM <- 0
      ctrl.next_sel = 1'b0;
      ctrl.ld_next  = 1'b1;
      ctrl.sum_sel  = 1'b0;
      ctrl.ld_sum   = 1'b1;
      state_n       = LP_COMPUTE_SUM;
    end else begin
      unique case (state)
        LP_COMPUTE_SUM: begin
          // SUM <- SUM + Memory[NUMA]
          ctrl.a_sel   = 1'b1;
          ctrl.add_sel = 1'b1;
          ctrl.sum_sel = 1'b1;
          ctrl.ld_sum  = 1'b1;
          state_n      = LP_GET_NEXT;
        end
        LP_GET_NEXT: begin
          // NUMA <- Memory[NEXT] + 1, NEXT <- Memory[NEXT]
          ctrl.a_sel    = 1'b0;
          ctrl.add_sel  = 1'b0;
          ctrl.next_sel = 1'b1;
          ctrl.ld_next  = 1'b1;
          state_n       = next_zero ? LP_DONE : LP_COMPUTE_SUM;
        end
        default: ; // IDLE and DONE wait for START
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) state <= LP_IDLE;
    else     state <= state_n;
  end

  assign done = (state == LP_DONE);

endmodule
