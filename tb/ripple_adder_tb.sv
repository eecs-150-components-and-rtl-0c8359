// Self-checking testbench of the ripple-carry adder: a 16-bit and a 4-bit
// instance, exhaustive for 4 bits and random plus carry-chain corner cases
// (all ones + 1) for 16 bits, compared with integer addition.
module ripple_adder_tb;

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

  logic [15:0] a, b, s;
  logic        ci, co;
  logic [3:0]  a4, b4, s4;
  logic        ci4, co4;

  ripple_adder #(.N(16)) dut (.a, .b, .cin(ci), .sum(s), .cout(co));
  ripple_adder #(.N(4))  dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));

  initial begin
    for (int i = 0; i < 512; i++) begin
      {ci4, a4, b4} = 9'(i);
      #1 check({co4, s4} == 5'(a4) + 5'(b4) + 5'(ci4), $sformatf("4-bit %h+%h+%b", a4, b4, ci4));
    end
    a = 16'hFFFF; b = 16'h0000; ci = 1'b1;
    #1 check({co, s} == 17'h10000, "carry through all 16 bits");
    for (int i = 0; i < 2000; i++) begin
      a = 16'($urandom); b = 16'($urandom); ci = 1'($urandom);
      #1 check({co, s} == 17'(a) + 17'(b) + 17'(ci), $sformatf("16-bit %h+%h+%b = %b %h", a, b, ci, co, s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
