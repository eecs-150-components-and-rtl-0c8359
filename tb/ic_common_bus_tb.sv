// Self-checking testbench of the common-bus interconnect: random single
// output enable and load enables, checking the bus value and the registers
// against a model.
module ic_common_bus_tb;

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
  logic [3:0]          oe, ld;
  logic [7:0]          bus, v;
  int                  s;

  ic_common_bus dut (.clk, .init, .init_data, .oe, .ld, .bus, .regs);

  initial begin
    init = 1'b1; init_data = {8'd4, 8'd3, 8'd2, 8'd1}; oe = '0; ld = '0;
    @(negedge clk) init = 1'b0;
    m = init_data;
    #1 check(bus == 0, "idle bus");
    for (int i = 0; i < 2000; i++) begin
      s = $urandom % 5;
      oe = (s == 4) ? 4'b0 : 4'(1 << s);
      ld = 4'($urandom);
      init = ($urandom % 32 == 0); init_data = 32'($urandom);
      v = (s == 4) ? 8'd0 : m[s];
      #1 check(bus == v, $sformatf("bus %h expected %h", bus, v));
      @(negedge clk);
      for (int k = 0; k < 4; k++) if (init) m[k] = init_data[k]; else if (ld[k]) m[k] = v;
      check(regs == m, $sformatf("cycle %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
