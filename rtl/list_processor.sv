// Linked-list summing processor.
//
// Forms the sum of the 2's complement integers held in a linked list that
// starts at memory address 0. A node at address p holds the pointer to the
// next node in word p and its number in word p+1; a pointer of 0 ends the
// list, and the list has at least one node. Pulsing START restarts the
// summation from the head; DONE rises when the last number has been added and
// R then holds the sum (R is the SUM register, valid while DONE is high).
// busy is high in the two working states.
//
// Timing: the START cycle, then two cycles per node (COMPUTE_SUM, GET_NEXT);
// for an n-node list DONE is high from the (2n+1)-th rising edge after the
// edge that sampled START. The memory must answer a read within the same cycle
// (asynchronous read). ARCH selects the datapath: 3 (default) shares one adder
// between the two states, 2 uses a second adder for the pointer increment.
module list_processor
  import rtl150_pkg::*;
#(
  parameter int unsigned AW    = 8,
  parameter int unsigned DW    = 8,
  parameter int unsigned SUM_W = 8,
  parameter int unsigned ARCH  = 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  output logic [AW-1:0]    mem_a,
  input  logic [DW-1:0]    mem_d,
  output logic             done,
  output logic             busy,
  output logic [SUM_W-1:0] r
);

  lp_ctrl_t  ctrl;
  logic      next_zero;
  lp_state_e state;

  lp_controller u_ctrl (
    .clk, .rst, .start, .next_zero, .ctrl, .done, .state
  );

  assign busy = (state == LP_COMPUTE_SUM) || (state == LP_GET_NEXT);

  lp_datapath #(.AW(AW), .DW(DW), .SUM_W(SUM_W), .ARCH(ARCH)) u_dp (
    .clk, .ctrl, .mem_a, .mem_d, .next_zero, .sum(r)
  );

endmodule
