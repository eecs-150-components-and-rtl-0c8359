// Self-checking testbench of the linked-list summing processor.
//
// Two processors, one per architecture (ARCH 3 and ARCH 2), read the same
// testbench memory (2**8 x 8, asynchronous read). Lists tested: the four-node
// example list with nodes at 0x00, 0x05, 0x0E, 0x0A; a one-node list; a full
// 127-node list; random lists at random addresses. For each, the expected sum
// is computed here and compared with R once DONE rises, and DONE must rise
// exactly 2n+1 clock edges after the edge that sampled START (two cycles per
// element). A restart while running is also checked. A watchdog ends the run.
module list_processor_tb;
  import rtl150_pkg::*;

  localparam int AW = 8, DW = 8, SW = 8;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst, start;
  logic [DW-1:0] mem [2**AW];
  logic [AW-1:0] a3, a2;
  logic [SW-1:0] r3, r2;
  logic          done3, done2, busy3, busy2;

  list_processor #(.ARCH(3)) dut3 (
    .clk, .rst, .start, .mem_a(a3), .mem_d(mem[a3]), .done(done3), .busy(busy3), .r(r3)
  );
  list_processor #(.ARCH(2)) dut2 (
    .clk, .rst, .start, .mem_a(a2), .mem_d(mem[a2]), .done(done2), .busy(busy2), .r(r2)
  );

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected sum of a list placed in mem, walking it as the algorithm does.
  function automatic logic [SW-1:0] ref_sum(output int n);
    logic [SW-1:0] s = '0;
    int p = 0;
    n = 0;
    do begin
      s += SW'($signed(mem[p+1]));
      p = int'(mem[p]);
      n++;
    end while (p != 0 && n < 300);
    return s;
  endfunction

  // Place a list of n nodes at random free addresses; node 0 is at address 0.
  task automatic make_list(input int n);
    bit used [2**AW];
    int addr [$];
    int p;
    foreach (used[i]) used[i] = 1'b0;
    foreach (mem[i]) mem[i] = DW'($urandom);
    addr.push_back(0);
    used[0] = 1'b1; used[1] = 1'b1;
    while (addr.size() < n) begin
      // Long lists use even addresses only, so that they always fit.
      p = (n > 64) ? 2 * (1 + ($urandom % 127)) : 1 + ($urandom % 254);
      if (!used[p] && !used[p+1]) begin
        used[p] = 1'b1; used[p+1] = 1'b1;
        addr.push_back(p);
      end
    end
    for (int i = 0; i < n; i++) begin
      mem[addr[i]]   = (i == n-1) ? 8'h00 : DW'(addr[i+1]);
      mem[addr[i]+1] = DW'($urandom);
    end
  endtask

  // Pulse START, then wait for DONE on both processors and check R and timing.
  task automatic run_and_check(input string name);
    int n, cyc;
    logic [SW-1:0] exp;
    exp = ref_sum(n);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;   // START sampled at the edge just passed
    cyc = 1;
    check(!done3 && !done2, {name, ": DONE low after START"});
    while (!done3 && cyc < 1000) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == 2*n + 1, $sformatf("%s: DONE after %0d edges, expected %0d (n=%0d)", name, cyc, 2*n+1, n));
    check(done2, {name, ": ARCH 2 DONE in the same cycle"});
    check(r3 == exp, $sformatf("%s: ARCH 3 R=%h expected %h", name, r3, exp));
    check(r2 == exp, $sformatf("%s: ARCH 2 R=%h expected %h", name, r2, exp));
    repeat (3) @(negedge clk);
    check(done3 && r3 == exp, {name, ": DONE and R held"});
  endtask

  initial begin
    rst = 1'b1; start = 1'b0;
    foreach (mem[i]) mem[i] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(!done3 && !busy3, "idle after reset");

    // Example list: 0 -> 5 -> 0xE -> 0xA -> end, numbers X0..X3.
    mem[8'h00] = 8'h05; mem[8'h01] = 8'd17;         // X0 = 17
    mem[8'h05] = 8'h0E; mem[8'h06] = 8'hF6;         // X1 = -10
    mem[8'h0E] = 8'h0A; mem[8'h0F] = 8'd100;        // X2 = 100
    mem[8'h0A] = 8'h00; mem[8'h0B] = 8'hFD;         // X3 = -3
    run_and_check("example list");
    check(r3 == 8'd104, "example list sums to 104");

    // One node only.
    make_list(1);
    run_and_check("one node");

    // Longest list that fits: 127 nodes in 256 words (two words per node).
    make_list(127);
    run_and_check("127 nodes");

    for (int t = 0; t < 40; t++) begin
      make_list(1 + ($urandom % 60));
      run_and_check($sformatf("random list %0d", t));
    end

    // Restart in the middle of a run: START resets to the head of the list.
    make_list(20);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    repeat (15) @(negedge clk);
    check(busy3 && !done3, "busy in the middle of a run");
    run_and_check("restart");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
