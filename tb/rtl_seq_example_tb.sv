// Self-checking testbench of the accumulate/swap RTL sequence: random initial
// values, a start pulse, and after exactly three busy cycles the expected
// results ACC = acc+r0+r0... computed here step by step from the RTL; done
// must pulse once, in the cycle after the third step.
module rtl_seq_example_tb;

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

  logic       rst, start, init, busy, done;
  logic [7:0] init_r0, init_r1, init_acc, r0, r1, acc;
  logic [7:0] e0, e1, ea;
  int busy_cycles;

  rtl_seq_example dut (.clk, .rst, .start, .init, .init_r0, .init_r1, .init_acc, .busy, .done, .r0, .r1, .acc);

  initial begin
    rst = 1'b1; start = 0; init = 0; init_r0 = 0; init_r1 = 0; init_acc = 0;
    @(negedge clk) rst = 1'b0;
    check(!busy && !done, "idle after reset");
    for (int t = 0; t < 200; t++) begin
      init = 1'b1; init_r0 = 8'($urandom); init_r1 = 8'($urandom); init_acc = 8'($urandom);
      @(negedge clk) init = 1'b0;
      // The sequence, worked out here:
      ea = init_acc + init_r0; e1 = init_r0;  // ACC <- ACC + R0, R1 <- R0
      ea = ea + e1;            e0 = e1;       // ACC <- ACC + R1, R0 <- R1
      e0 = ea;                                // R0 <- ACC
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      busy_cycles = 0;
      while (busy && busy_cycles < 10) begin
        check(!done, "no done while busy");
        @(negedge clk); busy_cycles++;
      end
      check(busy_cycles == 3, $sformatf("busy for %0d cycles, expected 3", busy_cycles));
      check(done, "done pulse after the last step");
      check(r0 == e0 && r1 == e1 && acc == ea, $sformatf("r0=%h r1=%h acc=%h expected %h %h %h", r0, r1, acc, e0, e1, ea));
      @(negedge clk) check(!done && r0 == e0 && acc == ea, "done is one cycle, registers hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
