// Self-checking testbench of the list processor with its memory.
//
// Loads lists through the load port (one word per clock), pulses START and
// checks R against a sum computed here and the DONE time (2n+1 edges after
// START). Covers the four-node example list, a 127-node list filling the
// memory, and random lists.
module lp_system_tb;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst, start, done, load_en;
  logic [7:0] r, load_addr, load_data;
  logic [7:0] img [256];

  lp_system dut (.clk, .rst, .start, .done, .r, .load_en, .load_addr, .load_data);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Build a list of n nodes in img at shuffled even addresses, head at 0.
  task automatic make_list(input int n);
    int slot [$];
    int addr [$];
    foreach (img[i]) img[i] = 8'($urandom);
    for (int i = 1; i < 128; i++) slot.push_back(2*i);
    slot.shuffle();
    addr.push_back(0);
    for (int i = 1; i < n; i++) addr.push_back(slot[i-1]);
    for (int i = 0; i < n; i++) begin
      img[addr[i]]   = (i == n-1) ? 8'h00 : 8'(addr[i+1]);
      img[addr[i]+1] = 8'($urandom);
    end
  endtask

  task automatic load_and_run(input string name);
    int n = 0, p = 0, cyc;
    logic [7:0] exp = '0;
    do begin exp += img[p+1]; p = int'(img[p]); n++; end while (p != 0);
    for (int i = 0; i < 256; i++) begin
      @(negedge clk) load_en = 1'b1; load_addr = 8'(i); load_data = img[i];
    end
    @(negedge clk) load_en = 1'b0;
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
    check(cyc == 2*n + 1, $sformatf("%s: DONE after %0d edges, expected %0d", name, cyc, 2*n+1));
    check(r == exp, $sformatf("%s: R=%h expected %h", name, r, exp));
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; load_en = 1'b0; load_addr = '0; load_data = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    foreach (img[i]) img[i] = '0;
    img[8'h00] = 8'h05; img[8'h01] = 8'd1;
    img[8'h05] = 8'h0E; img[8'h06] = 8'd2;
    img[8'h0E] = 8'h0A; img[8'h0F] = 8'd3;
    img[8'h0A] = 8'h00; img[8'h0B] = 8'd4;
    load_and_run("example list");
    check(r == 8'd10, "example list sums to 10");
    make_list(127);
    load_and_run("127 nodes");
    for (int t = 0; t < 8; t++) begin
      make_list(1 + ($urandom % 127));
      load_and_run($sformatf("random %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
