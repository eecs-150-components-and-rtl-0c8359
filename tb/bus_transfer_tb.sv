// Self-checking testbench of the bus transfer: the two transfers C <- A
// (Sel=0, Ld=1) and C <- B (Sel=1, Ld=1), the bus value for each select, and C
// holding when Ld is low, with random A and B.
module bus_transfer_tb;

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

  logic [7:0] a, b, bus, c, mc;
  logic       sel, ld;

  bus_transfer dut (.clk, .a, .b, .sel, .ld, .bus, .c);

  initial begin
    a = 8'h5A; b = 8'hC3;
    sel = 1'b0; ld = 1'b1;                        // C <- A
    #1 check(bus == a, "A on bus");
    @(negedge clk) check(c == 8'h5A, "C <- A");
    sel = 1'b1; ld = 1'b1;                        // C <- B
    #1 check(bus == b, "B on bus");
    @(negedge clk) check(c == 8'hC3, "C <- B");
    mc = c;
    for (int i = 0; i < 2000; i++) begin
      a = 8'($urandom); b = 8'($urandom); sel = 1'($urandom); ld = 1'($urandom);
      #1 check(bus == (sel ? b : a), "bus value");
      @(negedge clk);
      if (ld) mc = sel ? b : a;
      check(c == mc, $sformatf("C=%h expected %h", c, mc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
