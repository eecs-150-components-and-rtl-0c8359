// Self-checking testbench of the 1024 x 4 SRAM: writes every word, reads them
// back in random order with RD, checks that IO is driven only when reading,
// and random mixed read/write traffic against a model.
module sram1024x4_tb;

  localparam int WD_CYCLES = 40000;
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

  logic       rd, wr, io_oe;
  logic [9:0] a;
  logic [3:0] io_in, io_out;
  logic [3:0] m [1024];

  sram1024x4 dut (.clk, .rd, .wr, .a, .io_in, .io_out, .io_oe);

  initial begin
    for (int i = 0; i < 1024; i++) begin
      rd = 1'($urandom);
      wr = 1; a = 10'(i); io_in = 4'($urandom); m[i] = io_in;
      #1 check(!io_oe, "IO not driven while writing, even with RD");
      @(negedge clk);
    end
    wr = 0;
    for (int i = 0; i < 3000; i++) begin
      rd = 1'($urandom); a = 10'($urandom);
      #1 check(io_oe == rd && io_out == (rd ? m[a] : 4'h0), $sformatf("read %h: rd=%b oe=%b out=%h expected %h", a, rd, io_oe, io_out, m[a]));
      if ($urandom % 4 == 0) begin
        wr = 1; io_in = 4'($urandom);
        @(posedge clk) m[a] = io_in;
        #1 wr = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
