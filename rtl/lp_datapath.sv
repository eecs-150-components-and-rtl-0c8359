// Datapath of the linked-list summing processor.
//
// Registers: NEXT (pointer to the current node), NUMA (address of the node's
// number, NEXT+1) and SUM (running sum). The memory address is NEXT or NUMA
// (A_SEL). Each list node is two words: [p] holds the pointer to the next node
// and [p+1] the 2's complement number.
//
// ARCH = 3 (default): one shared adder. Its first operand is SUM (ADD_SEL=1,
//   used in COMPUTE_SUM for SUM <- SUM + Memory[NUMA]) or the constant 1
//   (ADD_SEL=0, used in GET_NEXT for NUMA <- Memory[NEXT] + 1); the second
//   operand is always the memory data D.
// ARCH = 2: two adders, SUM + D for SUM and D + 1 for NUMA; ADD_SEL is unused.
//
// NEXT_SEL chooses between loading the constants (NEXT <- 0, NUMA <- 1) and
// loading the memory word / adder result; SUM_SEL chooses between 0 and the
// adder. LD_NEXT loads NEXT and NUMA together, LD_SUM loads SUM. NEXT_ZERO is
// the zero test on the value about to enter NEXT, so the controller sees the
// end of the list in the same GET_NEXT cycle. All registers change on the
// rising edge; there is no reset, START initialises them.
//
// The mux and register structure follows the two architectures' block
// diagrams. SUM_W wider than DW sign-extends the numbers (the default keeps the
// 8-bit result bus).
module lp_datapath
  import rtl150_pkg::*;
#(
  parameter int unsigned AW    = 8,
  parameter int unsigned DW    = 8,
  parameter int unsigned SUM_W = 8,
  parameter int unsigned ARCH  = 3
) (
  input  logic             clk,
  input  lp_ctrl_t         ctrl,
  output logic [AW-1:0]    mem_a,
  input  logic [DW-1:0]    mem_d,
  output logic             next_zero,
  output logic [SUM_W-1:0] sum
);

  logic [AW-1:0]    next_q, numa_q, next_d, numa_d;
  logic [SUM_W-1:0] sum_d;
  logic [SUM_W-1:0] d_ext;
  logic [SUM_W-1:0] sum_add;  // value offered to SUM by the adder
  logic [AW-1:0]    numa_add; // value offered to NUMA by the adder

  // Numbers are 2's complement: sign-extend the memory word to SUM_W.
  assign d_ext = SUM_W'($signed(mem_d));

  if (ARCH == 2) begin : g_arch2
    // Two adders: SUM + D and D + 1.
    assign sum_add  = sum + d_ext;
    assign numa_add = AW'(mem_d) + AW'(1);
  end else begin : g_arch3
    // One adder shared by both states.
    logic [SUM_W-1:0] add_a, add_y;
    assign add_a    = ctrl.add_sel ? sum : SUM_W'(1);
    assign add_y    = add_a + d_ext;
    assign sum_add  = add_y;
    assign numa_add = add_y[AW-1:0];
  end

  assign next_d    = ctrl.next_sel ? AW'(mem_d) : '0;
  assign numa_d    = ctrl.next_sel ? numa_add : AW'(1);
  assign sum_d     = ctrl.sum_sel  ? sum_add  : '0;
  assign next_zero = (next_d == '0);
  assign mem_a     = ctrl.a_sel ? numa_q : next_q;

  always_ff @(posedge clk) begin
    if (ctrl.ld_next) begin
      next_q <= next_d;
      numa_q <= numa_d;
    end
    if (ctrl.ld_sum) sum <= sum_d;
  end

endmodule
