// Self-checking testbench of the accumulate/swap datapath: applies the three
// steps of the RTL sequence through the mux selects, then random selects, and
// compares R0, R1 and ACC with a model kept here.
module rtl_seq_datapath_tb;

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

  logic       s0, s1, s2, s3, ld_acc, init;
  logic [7:0] init_r0, init_r1, init_acc, r0, r1, acc;
  logic [7:0] m0, m1, ma, s2o, bus;

  rtl_seq_datapath dut (.clk, .s0, .s1, .s2, .s3, .ld_acc, .init, .init_r0, .init_r1, .init_acc, .r0, .r1, .acc);

  initial begin
    {s0, s1, s2, s3, ld_acc} = 5'b11000;
    init = 1'b1; init_r0 = 8'd3; init_r1 = 8'd5; init_acc = 8'd10;
    @(negedge clk) init = 1'b0;
    check(r0 == 3 && r1 == 5 && acc == 10, "init");
    // ACC <- ACC + R0, R1 <- R0
    {s0, s1, s2, s3, ld_acc} = 5'b10001;
    @(negedge clk) check(acc == 13 && r1 == 3 && r0 == 3, "step 1");
    // ACC <- ACC + R1, R0 <- R1
    {s0, s1, s2, s3, ld_acc} = 5'b01101;
    @(negedge clk) check(acc == 16 && r0 == 3 && r1 == 3, "step 2");
    // R0 <- ACC
    {s0, s1, s2, s3, ld_acc} = 5'b01010;
    @(negedge clk) check(r0 == 16 && acc == 16 && r1 == 3, "step 3");
    m0 = r0; m1 = r1; ma = acc;
    for (int i = 0; i < 2000; i++) begin
      {s0, s1, s2, s3, ld_acc} = 5'($urandom);
      init = ($urandom % 16 == 0);
      init_r0 = 8'($urandom); init_r1 = 8'($urandom); init_acc = 8'($urandom);
      s2o = s2 ? m1 : m0;
      bus = s3 ? ma : s2o;
      @(negedge clk);
      if (init) begin m0 = init_r0; m1 = init_r1; ma = init_acc; end
      else begin
        if (!s0) m0 = bus;
        if (!s1) m1 = bus;
        if (ld_acc) ma = ma + s2o;
      end
      check(r0 == m0 && r1 == m1 && acc == ma, $sformatf("cycle %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
