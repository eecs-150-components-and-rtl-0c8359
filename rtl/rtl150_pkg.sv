// Shared types for the example datapaths and the list processor.
//
// alu_op_e   : operation code of the 16-bit ALU and the accumulator datapath.
//              Add, Sub, AND, OR, NOT and XOR are the operations the design is
//              built around; PASS A and PASS B fill the two remaining codes of
//              the 3-bit operation field (this encoding is a local choice).
// lp_state_e : states of the list-processor controller. COMPUTE_SUM and
//              GET_NEXT are the two working states, one cycle each, so the
//              processor takes two cycles per list element.
// lp_ctrl_t  : the control points the controller drives into the list
//              processor datapath (mux selects and register loads).
// bs_*       : control encoding of the bit-slice datapath (local choice).
package rtl150_pkg;

  typedef enum logic [2:0] {
    ALU_ADD   = 3'd0,
    ALU_SUB   = 3'd1,
    ALU_AND   = 3'd2,
    ALU_OR    = 3'd3,
    ALU_NOT   = 3'd4,
    ALU_XOR   = 3'd5,
    ALU_PASSA = 3'd6,
    ALU_PASSB = 3'd7
  } alu_op_e;

  typedef enum logic [1:0] {
    LP_IDLE        = 2'd0,
    LP_COMPUTE_SUM = 2'd1,
    LP_GET_NEXT    = 2'd2,
    LP_DONE        = 2'd3
  } lp_state_e;

  // Control points of the list processor datapath.
  typedef struct packed {
    logic a_sel;    // memory address: 0 NEXT, 1 NUMA
    logic add_sel;  // shared adder operand: 0 constant 1, 1 SUM
    logic next_sel; // NEXT/NUMA source: 0 constants (0 / 1), 1 memory / adder
    logic ld_next;  // load NEXT and NUMA
    logic sum_sel;  // SUM source: 0 constant 0, 1 adder
    logic ld_sum;   // load SUM
  } lp_ctrl_t;

  // Bit-slice ALU operations.
  typedef enum logic [1:0] {
    BS_ADD = 2'd0,
    BS_AND = 2'd1,
    BS_OR  = 2'd2,
    BS_XOR = 2'd3
  } bs_op_e;

  // Source of the second ALU bus of the bit slice.
  typedef enum logic [2:0] {
    BS_Y_R0 = 3'd0,
    BS_Y_RS = 3'd1,
    BS_Y_RT = 3'd2,
    BS_Y_RD = 3'd3,
    BS_Y_AC = 3'd4
  } bs_ysel_e;

  // Controls shared by every slice of the bit-slice datapath.
  typedef struct packed {
    logic [1:0] xsel;     // register on the first ALU bus: R0, rs, rt, rd
    bs_ysel_e   ysel;     // source of the second ALU bus
    logic       in_ac;    // register input bus: 0 from memory, 1 from AC
    logic [3:0] ld;       // load R0, rs, rt, rd (bit 0 = R0) from the input bus
    logic       ld_ac;    // load AC from the ALU
    bs_op_e     op;       // ALU operation
  } bs_ctrl_t;

endpackage
