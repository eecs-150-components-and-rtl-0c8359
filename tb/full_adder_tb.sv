// Self-checking testbench of the full adder: all eight input combinations,
// compared with the arithmetic sum ain + bin + cin = {cout, sum}.
module full_adder_tb;

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

  logic ain, bin, cin, sum, cout;

  full_adder dut (.ain, .bin, .cin, .sum, .cout);

  initial begin
    for (int i = 0; i < 8; i++) begin
      {ain, bin, cin} = 3'(i);
      #1 check({cout, sum} == 2'(ain) + 2'(bin) + 2'(cin), $sformatf("inputs %b%b%b -> %b%b", ain, bin, cin, cout, sum));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
