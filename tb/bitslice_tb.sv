// Self-checking testbench of one bit slice: random control words, memory bit
// and carry in, compared cycle by cycle with a model of the slice's five
// storage bits, its two ALU busses, the ALU output and the carry out.
module bitslice_tb;
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

  logic     rst, mem_in, ci, co, ac, bus_x;
  bs_ctrl_t ctrl;
  logic [3:0] m_r;
  logic       m_ac, bin, x, y, o, c;

  bitslice dut (.clk, .rst, .ctrl, .mem_in, .ci, .co, .ac, .bus_x);

  initial begin
    rst = 1'b1; ctrl = '0; mem_in = 0; ci = 0;
    @(negedge clk) rst = 1'b0;
    m_r = '0; m_ac = 0;
    for (int i = 0; i < 3000; i++) begin
      ctrl.xsel  = 2'($urandom);
      ctrl.ysel  = bs_ysel_e'($urandom % 5);
      ctrl.in_ac = 1'($urandom);
      ctrl.ld    = 4'($urandom);
      ctrl.ld_ac = 1'($urandom);
      ctrl.op    = bs_op_e'($urandom);
      mem_in = 1'($urandom); ci = 1'($urandom);
      bin = ctrl.in_ac ? m_ac : mem_in;
      x = m_r[ctrl.xsel];
      y = (ctrl.ysel == BS_Y_AC) ? m_ac : m_r[ctrl.ysel[1:0]];
      c = 1'b0;
      case (ctrl.op)
        BS_ADD: begin o = x ^ y ^ ci; c = (x & y) | (x & ci) | (y & ci); end
        BS_AND: o = x & y;
        BS_OR:  o = x | y;
        default: o = x ^ y;
      endcase
      #1 check(bus_x == x && co == c, $sformatf("cycle %0d: bus_x=%b co=%b expected %b %b", i, bus_x, co, x, c));
      @(negedge clk);
      for (int k = 0; k < 4; k++) if (ctrl.ld[k]) m_r[k] = bin;
      if (ctrl.ld_ac) m_ac = o;
      check(ac == m_ac, $sformatf("cycle %0d: AC=%b expected %b", i, ac, m_ac));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
