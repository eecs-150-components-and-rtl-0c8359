// Self-checking testbench of the common-input (mux) interconnect: random
// source and load enables compared with a model of the four registers.
module ic_mux_input_tb;

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
  logic [3:0][7:0]     init_data, regs, m;
  logic [1:0]          src;
  logic [3:0]          ld;
  logic [7:0]          v;

  ic_mux_input dut (.clk, .init, .init_data, .src, .ld, .regs);

  initial begin
    init = 1'b1; init_data = {8'd4, 8'd3, 8'd2, 8'd1}; src = '0; ld = '0;
    @(negedge clk) init = 1'b0;
    m = init_data;
    src = 2'd3; ld = 4'b0011;                      // rs <- R4, rt <- R4
    @(negedge clk) check(regs[0] == 4 && regs[1] == 4 && regs[2] == 3 && regs[3] == 4, "one source, two destinations");
    m = regs;
    for (int i = 0; i < 2000; i++) begin
      src = 2'($urandom); ld = 4'($urandom);
      init = ($urandom % 32 == 0); init_data = 32'($urandom);
      v = m[src];
      @(negedge clk);
      for (int k = 0; k < 4; k++) if (init) m[k] = init_data[k]; else if (ld[k]) m[k] = v;
      check(regs == m, $sformatf("cycle %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
