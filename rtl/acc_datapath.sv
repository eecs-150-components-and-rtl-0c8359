// Accumulator datapath: a single-address machine's ALU and registers.
//
// REG is loaded from din when ld_reg is high. The ALU computes AC op REG (AC is
// the first operand, so SUB gives AC - REG); when ld_ac is high the result is
// stored back into AC on the rising edge. result, n and z are the ALU's
// current output and status (combinational). Synchronous reset clears AC and
// REG. The accumulator-as-ALU-operand-and-destination structure and the
// 16-bit width follow the design; load enables and reset are local choices.
module acc_datapath
  import rtl150_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] din,
  input  logic         ld_reg,
  input  logic         ld_ac,
  input  alu_op_e      op,
  output logic [W-1:0] ac,
  output logic [W-1:0] result,
  output logic         n,
  output logic         z
);

  logic [W-1:0] reg_q;

  alu #(.W(W)) u_alu (.a(ac), .b(reg_q), .op(op), .s(result), .n(n), .z(z));

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_q <= '0;
      ac    <= '0;
    end else begin
      if (ld_reg) reg_q <= din;
      if (ld_ac)  ac    <= result;
    end
  end

endmodule
