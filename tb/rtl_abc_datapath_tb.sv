// Self-checking testbench of the regA/regB/regC datapath: random load enables,
// regB source and IN, compared with a model of the three registers.
module rtl_abc_datapath_tb;

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

  logic       ld_a, ld_b, ld_c, b_sel;
  logic [7:0] in_data, rega, regb, regc, ma, mb, mc;

  rtl_abc_datapath dut (.clk, .in_data, .ld_a, .ld_b, .ld_c, .b_sel, .rega, .regb, .regc);

  initial begin
    in_data = 8'd1; {ld_a, ld_b, ld_c, b_sel} = 4'b1100;
    @(negedge clk) {ld_a, ld_b, ld_c, b_sel} = 4'b0010;
    @(negedge clk);
    ma = 1; mb = 1; mc = 2;
    check(rega == ma && regb == mb && regc == mc, "first loads");
    for (int i = 0; i < 2000; i++) begin
      {ld_a, ld_b, ld_c, b_sel} = 4'($urandom);
      in_data = 8'($urandom);
      @(negedge clk);
      begin
        logic [7:0] na, nb, nc;
        na = ld_a ? in_data : ma;
        nb = ld_b ? (b_sel ? mc : in_data) : mb;
        nc = ld_c ? ma + mb : mc;
        ma = na; mb = nb; mc = nc;
      end
      check(rega == ma && regb == mb && regc == mc, $sformatf("cycle %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
