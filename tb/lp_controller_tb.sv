// Self-checking testbench of the list processor controller.
//
// Checks the reset state, the initialisation controls in the START cycle, the
// alternation COMPUTE_SUM / GET_NEXT with the control points of each state,
// the exit to DONE when NEXT_ZERO is seen in GET_NEXT, DONE held until the
// next START, and START overriding a run in progress.
module lp_controller_tb;
  import rtl150_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic      rst, start, next_zero, done;
  lp_ctrl_t  ctrl;
  lp_state_e state;

  lp_controller dut (.clk, .rst, .start, .next_zero, .ctrl, .done, .state);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam lp_ctrl_t INIT = '{a_sel: 1'b0, add_sel: 1'b0, next_sel: 1'b0, ld_next: 1'b1, sum_sel: 1'b0, ld_sum: 1'b1};
  localparam lp_ctrl_t CS   = '{a_sel: 1'b1, add_sel: 1'b1, next_sel: 1'b0, ld_next: 1'b0, sum_sel: 1'b1, ld_sum: 1'b1};
  localparam lp_ctrl_t GN   = '{a_sel: 1'b0, add_sel: 1'b0, next_sel: 1'b1, ld_next: 1'b1, sum_sel: 1'b0, ld_sum: 1'b0};

  task automatic run(input int n);
    start = 1'b1;
    #1 check(ctrl == INIT, "initialisation controls while START");
    @(negedge clk) start = 1'b0;
    for (int i = 0; i < n; i++) begin
      next_zero = 1'b1; // must be ignored in COMPUTE_SUM
      #1 check(state == LP_COMPUTE_SUM && ctrl == CS && !done, $sformatf("COMPUTE_SUM %0d", i));
      @(negedge clk);
      next_zero = (i == n-1);
      #1 check(state == LP_GET_NEXT && ctrl == GN && !done, $sformatf("GET_NEXT %0d", i));
      @(negedge clk);
    end
    next_zero = 1'($urandom);
    #1 check(state == LP_DONE && done && ctrl == '0, "DONE after last element");
    repeat (4) @(negedge clk);
    check(done, "DONE held");
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; next_zero = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    #1 check(state == LP_IDLE && !done && ctrl == '0, "idle after reset");
    repeat (3) @(negedge clk);
    check(state == LP_IDLE, "idle waits for START");
    run(1);
    @(negedge clk) run(5);
    @(negedge clk) run(17);
    // START in the middle of a run
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0; next_zero = 1'b0;
    repeat (3) @(negedge clk);
    run(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
