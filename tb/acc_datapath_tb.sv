// Self-checking testbench of the accumulator datapath: random sequences of
// REG loads and AC <- AC op REG operations, compared with a model of AC and
// REG kept here; also the N/Z flags and holding when no load is asserted.
module acc_datapath_tb;
  import rtl150_pkg::*;

  localparam int WD_CYCLES = 20000;
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

  logic        rst, ld_reg, ld_ac, n, z;
  logic [15:0] din, ac, result;
  alu_op_e     op;
  logic [15:0] m_ac, m_reg, e;

  acc_datapath dut (.clk, .rst, .din, .ld_reg, .ld_ac, .op, .ac, .result, .n, .z);

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
    rst = 1'b1; ld_reg = 0; ld_ac = 0; din = '0; op = ALU_ADD;
    @(negedge clk) rst = 1'b0;
    m_ac = '0; m_reg = '0;
    check(ac == 0, "AC cleared by reset");
    for (int i = 0; i < 3000; i++) begin
      ld_reg = 1'($urandom); ld_ac = 1'($urandom);
      din = 16'($urandom); op = alu_op_e'($urandom % 8);
      e = ref_alu(op, m_ac, m_reg);
      #1 check(result == e && n == e[15] && z == (e == 0), $sformatf("ALU output %h expected %h", result, e));
      @(negedge clk);
      if (ld_ac)  m_ac  = e;
      if (ld_reg) m_reg = din;
      check(ac == m_ac, $sformatf("AC %h expected %h", ac, m_ac));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
