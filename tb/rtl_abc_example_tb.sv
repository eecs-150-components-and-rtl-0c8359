// Self-checking testbench of regA <- IN; regB <- IN; regC <- regA + regB;
// regB <- regC: presents a new IN value each step, checks each register after
// its step, the four busy cycles, the done pulse and the final values.
module rtl_abc_example_tb;

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

  logic       rst, start, busy, done;
  logic [7:0] in_data, rega, regb, regc, x, y;

  rtl_abc_example dut (.clk, .rst, .start, .in_data, .busy, .done, .rega, .regb, .regc);

  initial begin
    rst = 1'b1; start = 0; in_data = 0;
    @(negedge clk) rst = 1'b0;
    check(!busy && !done, "idle after reset");
    for (int t = 0; t < 200; t++) begin
      x = 8'($urandom); y = 8'($urandom);
      start = 1'b1;
      @(negedge clk) start = 1'b0; in_data = x;
      check(busy, "step 1 busy");
      @(negedge clk) in_data = y;                 // regA <- IN
      check(rega == x && busy, "regA <- IN");
      @(negedge clk) in_data = 8'($urandom);      // regB <- IN
      check(regb == y && busy, "regB <- IN");
      @(negedge clk);                             // regC <- regA + regB
      check(regc == 8'(x + y) && busy, "regC <- regA + regB");
      @(negedge clk);                             // regB <- regC
      check(regb == 8'(x + y) && rega == x && regc == 8'(x + y), "regB <- regC");
      check(!busy && done, "done after four steps");
      @(negedge clk) check(!done, "done is one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
