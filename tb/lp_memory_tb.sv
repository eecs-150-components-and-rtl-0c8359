// Self-checking testbench of the list processor memory.
//
// Writes every word through the single address port, then reads back in
// random order and checks the asynchronous read (data valid in the same cycle
// as the address, without a clock edge), and that a write cycle still reads
// the old word before the edge.
module lp_memory_tb;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] a, d, wd;
  logic       we;
  logic [7:0] model [256];

  lp_memory dut (.clk, .a, .d, .we, .wd);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; a = '0; wd = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      a = 8'(i); wd = 8'($urandom); we = 1'b1; model[i] = wd;
    end
    @(negedge clk) we = 1'b0;
    for (int i = 0; i < 600; i++) begin
      #2 a = 8'($urandom);
      #1 check(d == model[a], $sformatf("read %h = %h expected %h", a, d, model[a]));
    end
    @(negedge clk);
    a = 8'h33; wd = ~model[8'h33]; we = 1'b1;
    #1 check(d == model[8'h33], "old word before the write edge");
    @(negedge clk) we = 1'b0;
    check(d == ~model[8'h33], "new word after the write edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
