// Self-checking testbench of the 4 x 4 register file: writes all words, then
// random simultaneous reads and writes at different addresses, checking read
// enable, the old value on a read of the word being written, and the data.
module regfile4x4_tb;

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

  logic       re, we, q_en;
  logic [1:0] ra, wa;
  logic [3:0] d, q;
  logic [3:0] m [4];

  regfile4x4 dut (.clk, .re, .ra, .we, .wa, .d, .q, .q_en);

  initial begin
    re = 0; ra = 0;
    for (int i = 0; i < 4; i++) begin
      we = 1; wa = 2'(i); d = 4'(i * 5 + 1); m[i] = d;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 4; i++) begin
      re = 1; ra = 2'(i);
      #1 check(q_en && q == m[i], $sformatf("word %0d", i));
    end
    re = 0;
    #1 check(!q_en && q == 0, "read disabled");
    for (int i = 0; i < 2000; i++) begin
      re = 1'($urandom); ra = 2'($urandom); we = 1'($urandom); wa = 2'($urandom); d = 4'($urandom);
      #1 check(q_en == re && q == (re ? m[ra] : 4'h0), $sformatf("read %0d = %h expected %h", ra, q, m[ra]));
      @(negedge clk);
      if (we) m[wa] = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
