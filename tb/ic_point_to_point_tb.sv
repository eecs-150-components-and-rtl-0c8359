// Self-checking testbench of the point-to-point interconnect: random per-
// register selects (including simultaneous swaps) compared with a model of
// the four registers.
module ic_point_to_point_tb;

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

  logic                init;
  logic [3:0][7:0]     init_data, regs, m, nm;
  logic [3:0][1:0]     sel;

  ic_point_to_point dut (.clk, .init, .init_data, .sel, .regs);

  initial begin
    init = 1'b1; init_data = {8'd4, 8'd3, 8'd2, 8'd1}; sel = '0;
    @(negedge clk) init = 1'b0;
    m = init_data;
    check(regs == m, "init");
    sel = {2'd3, 2'd2, 2'd0, 2'd1};               // swap rs and rt in one cycle
    @(negedge clk) check(regs[0] == 2 && regs[1] == 1 && regs[2] == 3 && regs[3] == 4, "swap rs, rt");
    m = regs;
    for (int i = 0; i < 2000; i++) begin
      sel = 8'($urandom);
      init = ($urandom % 32 == 0); init_data = 32'($urandom);
      for (int k = 0; k < 4; k++) nm[k] = init ? init_data[k] : m[sel[k]];
      @(negedge clk) m = nm;
      check(regs == m, $sformatf("cycle %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
