// Self-checking testbench of the 16-bit ALU: every operation on random and
// corner operands, result and the N and Z flags compared with a reference
// computed here.
module alu_tb;
  import rtl150_pkg::*;

  localparam int WD_CYCLES = 10000;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (WD_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] a, b, s, e;
  alu_op_e     op;
  logic        n, z;

  alu dut (.a, .b, .op, .s, .n, .z);

  function automatic logic [15:0] ref_alu(alu_op_e o, logic [15:0] x, logic [15:0] y);
    case (o)
      ALU_ADD:   return x + y;
      ALU_SUB:   return x - y;
      ALU_AND:   return x & y;
      ALU_OR:    return x | y;
      ALU_NOT:   return ~x;
      ALU_XOR:   return x ^ y;
      ALU_PASSA: return x;
      default:   return y;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 4000; i++) begin
      op = alu_op_e'(i % 8);
      if (i < 64) begin
        a = (i % 3 == 0) ? 16'h0000 : (i % 3 == 1) ? 16'hFFFF : 16'h8000;
        b = (i % 5 < 2) ? a : 16'h0001;
      end else begin
        a = 16'($urandom); b = 16'($urandom);
      end
      e = ref_alu(op, a, b);
      #1 check(s == e && n == e[15] && z == (e == 0),
               $sformatf("op %0d a=%h b=%h: s=%h n=%b z=%b expected %h", op, a, b, s, n, z, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
