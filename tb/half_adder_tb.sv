// Self-checking testbench of the half adder: all four input pairs, compared
// with the arithmetic sum a + b = {c, s}.
module half_adder_tb;

  localparam int WD_CYCLES = 1000;
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

  logic a, b, s, c;

  half_adder dut (.a, .b, .s, .c);

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1 check({c, s} == 2'(a) + 2'(b), $sformatf("a=%0d b=%0d -> c=%0d s=%0d", a, b, c, s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
