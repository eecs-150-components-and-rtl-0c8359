// W-bit ALU (default 16) with status outputs.
//
// s is the result of operation op on a and b: ADD a+b, SUB a-b, AND, OR,
// NOT (~a), XOR, PASS A, PASS B. Add and subtract share one ripple-carry adder;
// subtract feeds ~b with a carry in of 1. n is the sign bit of s (negative in
// 2's complement) and z is high when s is zero. Purely combinational.
// The 16-bit operands, the 3-bit operation field, the N/S/Z outputs and the
// Add/Sub/AND/OR/NOT/XOR operations follow the design; the operation encoding
// and the two PASS codes are local choices.
module alu
  import rtl150_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  alu_op_e      op,
  output logic [W-1:0] s,
  output logic         n,
  output logic         z
);

  logic [W-1:0] add_b, add_s;
  logic         add_cin, add_cout;

  assign add_b   = (op == ALU_SUB) ? ~b : b;
  assign add_cin = (op == ALU_SUB);

  ripple_adder #(.N(W)) u_add (
    .a(a), .b(add_b), .cin(add_cin), .sum(add_s), .cout(add_cout)
  );

  always_comb begin
    unique case (op)
      ALU_ADD, ALU_SUB: s = add_s;
      ALU_AND:          s = a & b;
      ALU_OR:           s = a | b;
      ALU_NOT:          s = ~a;
      ALU_XOR:          s = a ^ b;
      ALU_PASSA:        s = a;
      ALU_PASSB:        s = b;
      default:          s = add_s;
    endcase
  end

  assign n = s[W-1];
  assign z = (s == '0);

  // The carry out is not one of the ALU's outputs.
  logic unused_cout;
  assign unused_cout = add_cout;

endmodule
