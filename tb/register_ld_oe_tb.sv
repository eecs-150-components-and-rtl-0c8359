// Self-checking testbench of the register with LD and OE: loads only on an
// edge with LD high, output shown only with OE high (q_en), random sequences
// against a model.
module register_ld_oe_tb;

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

  logic       ld, oe, q_en;
  logic [7:0] d, q, m;

  register_ld_oe dut (.clk, .ld, .oe, .d, .q, .q_en);

  initial begin
    ld = 1'b1; oe = 1'b0; d = 8'hA5;
    @(negedge clk) m = 8'hA5;
    ld = 1'b0; d = 8'h00;
    #1 check(!q_en && q == 0, "disconnected with OE low");
    oe = 1'b1;
    #1 check(q_en && q == 8'hA5, "stored value with OE high");
    @(negedge clk) check(q == 8'hA5, "holds with LD low");
    for (int i = 0; i < 2000; i++) begin
      ld = 1'($urandom); oe = 1'($urandom); d = 8'($urandom);
      #1 check(q_en == oe && q == (oe ? m : 8'h00), "output before edge");
      @(negedge clk);
      if (ld) m = d;
      check(q == (oe ? m : 8'h00), $sformatf("q=%h expected %h", q, m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
