// Self-checking testbench of the two-bus interconnect: two simultaneous
// transfers per cycle (a swap through the two busses, then random enables),
// checking both bus values and the registers against a model.
module ic_two_bus_tb;

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
  logic [3:0]          oe1, oe2, bsel, ld;
  logic [7:0]          bus1, bus2, v1, v2;
  int                  s1, s2;

  ic_two_bus dut (.clk, .init, .init_data, .oe1, .oe2, .bsel, .ld, .bus1, .bus2, .regs);

  initial begin
    init = 1'b1; init_data = {8'd4, 8'd3, 8'd2, 8'd1}; oe1 = '0; oe2 = '0; bsel = '0; ld = '0;
    @(negedge clk) init = 1'b0;
    // rd <- rs over bus 1 and rs <- rd over bus 2 in the same cycle
    oe1 = 4'b0001; oe2 = 4'b0100; ld = 4'b0101; bsel = 4'b0001;
    @(negedge clk) check(regs[0] == 3 && regs[2] == 1 && regs[1] == 2 && regs[3] == 4, "two transfers in one cycle");
    m = regs;
    for (int i = 0; i < 2000; i++) begin
      s1 = $urandom % 5; s2 = $urandom % 5;
      oe1 = (s1 == 4) ? 4'b0 : 4'(1 << s1);
      oe2 = (s2 == 4) ? 4'b0 : 4'(1 << s2);
      ld = 4'($urandom); bsel = 4'($urandom);
      init = ($urandom % 32 == 0); init_data = 32'($urandom);
      v1 = (s1 == 4) ? 8'd0 : m[s1];
      v2 = (s2 == 4) ? 8'd0 : m[s2];
      #1 check(bus1 == v1 && bus2 == v2, "bus values");
      @(negedge clk);
      for (int k = 0; k < 4; k++) if (init) m[k] = init_data[k]; else if (ld[k]) m[k] = bsel[k] ? v2 : v1;
      check(regs == m, $sformatf("cycle %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
