// Self-checking testbench of the list processor datapath.
//
// Drives the control points directly, with the memory modelled by a table
// read combinationally, for both architectures (ARCH 3 and ARCH 2). Each
// random step applies one of the three register-transfer groups (initialise,
// COMPUTE_SUM, GET_NEXT) and compares NEXT, NUMA (through the address mux),
// SUM, the memory address and NEXT_ZERO with a model kept here.
module lp_datapath_tb;
  import rtl150_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  lp_ctrl_t   ctrl;
  logic [7:0] mem [256];
  logic [7:0] a3, a2, s3, s2;
  logic       z3, z2;

  lp_datapath #(.ARCH(3)) dut3 (.clk, .ctrl, .mem_a(a3), .mem_d(mem[a3]), .next_zero(z3), .sum(s3));
  lp_datapath #(.ARCH(2)) dut2 (.clk, .ctrl, .mem_a(a2), .mem_d(mem[a2]), .next_zero(z2), .sum(s2));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] m_next, m_numa, m_sum;
  int op;

  initial begin
    foreach (mem[i]) mem[i] = 8'($urandom);
    mem[8'h10] = 8'h00;
    ctrl = '0;
    // Initialise: NEXT <- 0, NUMA <- 1, SUM <- 0.
    @(negedge clk);
    ctrl = '{a_sel: 1'b0, add_sel: 1'b0, next_sel: 1'b0, ld_next: 1'b1, sum_sel: 1'b0, ld_sum: 1'b1};
    #1 check(z3 && z2, "NEXT_ZERO on the constant 0");
    @(negedge clk);
    m_next = 8'd0; m_numa = 8'd1; m_sum = 8'd0;
    for (int t = 0; t < 400; t++) begin
      op = $urandom % 8;
      if (t % 50 == 0) mem[8'($urandom)] = 8'h10; // pointer to a word holding 0
      unique case (op)
        0: begin
          ctrl = '{a_sel: 1'b0, add_sel: 1'b0, next_sel: 1'b0, ld_next: 1'b1, sum_sel: 1'b0, ld_sum: 1'b1};
          #1;
          @(negedge clk);
          m_next = 8'd0; m_numa = 8'd1; m_sum = 8'd0;
        end
        1, 2, 3: begin // COMPUTE_SUM
          ctrl = '{a_sel: 1'b1, add_sel: 1'b1, next_sel: 1'b0, ld_next: 1'b0, sum_sel: 1'b1, ld_sum: 1'b1};
          #1 check(a3 == m_numa && a2 == m_numa, $sformatf("COMPUTE_SUM address %h/%h expected %h", a3, a2, m_numa));
          @(negedge clk);
          m_sum = m_sum + mem[m_numa];
        end
        4, 5, 6: begin // GET_NEXT
          ctrl = '{a_sel: 1'b0, add_sel: 1'b0, next_sel: 1'b1, ld_next: 1'b1, sum_sel: 1'b0, ld_sum: 1'b0};
          #1 check(a3 == m_next && a2 == m_next, $sformatf("GET_NEXT address %h expected %h", a3, m_next));
          check(z3 == (mem[m_next] == 0) && z2 == (mem[m_next] == 0), "NEXT_ZERO");
          @(negedge clk);
          m_numa = mem[m_next] + 8'd1;
          m_next = mem[m_next];
        end
        default: begin // no load: everything holds
          ctrl = '0;
          ctrl.add_sel = 1'($urandom);
          ctrl.sum_sel = 1'($urandom);
          ctrl.next_sel = 1'($urandom);
          @(negedge clk);
        end
      endcase
      check(s3 == m_sum && s2 == m_sum, $sformatf("SUM %h/%h expected %h", s3, s2, m_sum));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
