// End-to-end testbench of the top level, every parameter at its default.
//
// List processor: fills the 256-word memory through the load port with lists
// (the four-node example, a 127-node list that fills the memory, random lists),
// pulses START, and checks R and the DONE time (2n+1 cycles) against sums
// computed here; one run is restarted midway. The other designs are exercised
// side by side with directed transfers and compared with values worked out
// here. Each mechanism is counted (START initialisation, COMPUTE_SUM and
// GET_NEXT cycles, end of list, restart, memory load, every ALU operation,
// accumulate, bit-slice carry, the two RTL sequences, both bus sources, each
// interconnect transfer style, output/read enables, SRAM read and write); a
// mechanism that never happened counts as a failure.
module rtl_design_top_tb;
  import rtl150_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst;
  logic lp_start, lp_done, lp_load_en;
  logic [7:0] lp_r, lp_load_addr, lp_load_data;
  logic [15:0] alu_a, alu_b, alu_s; alu_op_e alu_op; logic alu_n, alu_z;
  logic [15:0] acc_din, acc_ac, acc_result; logic acc_ld_reg, acc_ld_ac, acc_n, acc_z; alu_op_e acc_op;
  bs_ctrl_t bs_ctrl; logic [15:0] bs_mem_in, bs_ac, bs_bus_x; logic bs_ci, bs_co;
  logic seq_start, seq_init, seq_busy, seq_done; logic [7:0] seq_init_r0, seq_init_r1, seq_init_acc, seq_r0, seq_r1, seq_acc;
  logic abc_start, abc_busy, abc_done; logic [7:0] abc_in, abc_rega, abc_regb, abc_regc;
  logic [7:0] bt_a, bt_b, bt_bus, bt_c; logic bt_sel, bt_ld;
  logic ic_init; logic [3:0][7:0] ic_init_data, p2p_regs, mux_regs, cb_regs, tb2_regs;
  logic [3:0][1:0] p2p_sel; logic [1:0] mux_src; logic [3:0] mux_ld, cb_oe, cb_ld, tb2_oe1, tb2_oe2, tb2_bsel, tb2_ld;
  logic [7:0] cb_bus, tb2_bus1, tb2_bus2;
  logic reg_ld, reg_oe, reg_q_en; logic [7:0] reg_d, reg_q;
  logic rf_re, rf_we, rf_q_en; logic [1:0] rf_ra, rf_wa; logic [3:0] rf_d, rf_q;
  logic sram_rd, sram_wr, sram_io_oe; logic [9:0] sram_a; logic [3:0] sram_io_in, sram_io_out;

  rtl_design_top dut (.*);

  // ---------------- mechanism counters ----------------
  typedef enum int {
    M_LP_START, M_LP_COMPUTE_SUM, M_LP_GET_NEXT, M_LP_END_OF_LIST, M_LP_RESTART, M_LP_LOAD,
    M_ALU_ADD, M_ALU_SUB, M_ALU_AND, M_ALU_OR, M_ALU_NOT, M_ALU_XOR, M_ALU_PASSA, M_ALU_PASSB,
    M_ALU_N, M_ALU_Z, M_ACC_OP, M_BS_CARRY, M_SEQ_RUN, M_ABC_RUN, M_BT_A, M_BT_B,
    M_P2P_SWAP, M_MUX_FANOUT, M_CB_TRANSFER, M_TB2_DUAL, M_REG_HIZ, M_RF_RW, M_SRAM_WR, M_SRAM_RD,
    M_COUNT
  } mech_e;
  int unsigned mech [M_COUNT];

  // Counted from the design's own state while it runs.
  always @(posedge clk) begin
    if (!rst) begin
      if (lp_start) mech[M_LP_START]++;
      if (dut.u_lp.u_lp.state == LP_COMPUTE_SUM && !lp_start) mech[M_LP_COMPUTE_SUM]++;
      if (dut.u_lp.u_lp.state == LP_GET_NEXT && !lp_start) begin
        mech[M_LP_GET_NEXT]++;
        if (dut.u_lp.u_lp.next_zero) mech[M_LP_END_OF_LIST]++;
      end
      if (lp_start && dut.u_lp.busy) mech[M_LP_RESTART]++;
      if (lp_load_en) mech[M_LP_LOAD]++;
    end
  end

  // ---------------- list processor ----------------
  logic [7:0] img [256];

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

  task automatic lp_load();
    for (int i = 0; i < 256; i++) begin
      @(negedge clk) lp_load_en = 1'b1; lp_load_addr = 8'(i); lp_load_data = img[i];
    end
    @(negedge clk) lp_load_en = 1'b0;
  endtask

  task automatic lp_run(input string name, input bit restart);
    int n = 0, p = 0, cyc;
    logic [7:0] exp = '0;
    do begin exp += img[p+1]; p = int'(img[p]); n++; end while (p != 0);
    if (restart) begin
      lp_start = 1'b1;
      @(negedge clk) lp_start = 1'b0;
      repeat (n) @(negedge clk);
    end
    lp_start = 1'b1;
    @(negedge clk) lp_start = 1'b0;
    cyc = 1;
    while (!lp_done && cyc < 1000) begin @(negedge clk); cyc++; end
    check(cyc == 2*n + 1, $sformatf("%s: DONE after %0d cycles, expected %0d", name, cyc, 2*n+1));
    check(lp_r == exp, $sformatf("%s: R=%h expected %h", name, lp_r, exp));
  endtask

  task automatic test_list_processor();
    foreach (img[i]) img[i] = '0;
    img[8'h00] = 8'h05; img[8'h01] = 8'd20;
    img[8'h05] = 8'h0E; img[8'h06] = 8'hEC;   // -20
    img[8'h0E] = 8'h0A; img[8'h0F] = 8'h7F;
    img[8'h0A] = 8'h00; img[8'h0B] = 8'h01;
    lp_load();
    lp_run("example list", 1'b0);
    check(lp_r == 8'h80, "example list sum wraps to 0x80");
    make_list(127);
    lp_load();
    lp_run("127-node list", 1'b0);
    for (int t = 0; t < 6; t++) begin
      make_list(1 + ($urandom % 127));
      lp_load();
      lp_run($sformatf("random list %0d", t), t == 2);
    end
  endtask

  // ---------------- ALU and accumulator ----------------
  function automatic logic [15:0] ref_alu(alu_op_e o, logic [15:0] x, logic [15:0] y);
    case (o)
      ALU_ADD:   return x + y;
      ALU_SUB:   return x - y;
      ALU_AND:   return x & y;
      ALU_OR:    return x | y;
      ALU_NOT:   return ~x;
      ALU_XOR:   return x ^ y;
      ALU_PASSA: return x;
      default:   return y;
    endcase
  endfunction

  task automatic test_alu();
    logic [15:0] e, m_ac;
    for (int i = 0; i < 400; i++) begin
      alu_op = alu_op_e'(i % 8);
      alu_a = (i % 50 == 0) ? 16'h0000 : 16'($urandom);
      alu_b = (i % 50 == 0) ? 16'h0000 : 16'($urandom);
      e = ref_alu(alu_op, alu_a, alu_b);
      #1 check(alu_s == e && alu_n == e[15] && alu_z == (e == 0), $sformatf("ALU op %0d", alu_op));
      mech[M_ALU_ADD + int'(alu_op)]++;
      if (alu_n) mech[M_ALU_N]++;
      if (alu_z) mech[M_ALU_Z]++;
    end
    // Accumulator: AC <- AC + REG over a short program.
    @(negedge clk) acc_din = 16'd100; acc_ld_reg = 1'b1; acc_ld_ac = 1'b0;
    @(negedge clk) acc_ld_reg = 1'b0; acc_op = ALU_PASSB; acc_ld_ac = 1'b1;   // AC <- REG
    @(negedge clk) acc_op = ALU_ADD;                                           // AC <- AC + REG (x3)
    repeat (3) begin @(negedge clk); mech[M_ACC_OP]++; end
    acc_op = ALU_SUB; acc_din = 16'd1; acc_ld_reg = 1'b1; acc_ld_ac = 1'b0;
    @(negedge clk) acc_ld_reg = 1'b0; acc_ld_ac = 1'b1;                         // AC <- AC - REG
    @(negedge clk) acc_ld_ac = 1'b0; mech[M_ACC_OP]++;
    m_ac = 16'd399;
    check(acc_ac == m_ac, $sformatf("accumulator %0d expected %0d", acc_ac, m_ac));
  endtask

  // ---------------- bit-slice datapath ----------------
  task automatic test_bitslice();
    // R0 <- 0xFFFF and rs <- 0x0001 from memory, then AC <- R0 + rs with carry.
    bs_ctrl = '0; bs_ci = 1'b0;
    @(negedge clk) bs_mem_in = 16'hFFFF; bs_ctrl.in_ac = 1'b0; bs_ctrl.ld = 4'b0001;
    @(negedge clk) bs_mem_in = 16'h0001; bs_ctrl.ld = 4'b0010;
    @(negedge clk) bs_ctrl.ld = 4'b0000; bs_ctrl.xsel = 2'd0; bs_ctrl.ysel = BS_Y_RS;
    bs_ctrl.op = BS_ADD; bs_ctrl.ld_ac = 1'b1;
    #1 if (bs_co) mech[M_BS_CARRY]++;
    check(bs_co, "bit-slice carry out of the top slice");
    @(negedge clk) bs_ctrl.ld_ac = 1'b0;
    check(bs_ac == 16'h0000, "bit-slice AC = 0xFFFF + 1");
    // rt <- AC (through the input bus), AC <- rt XOR rs
    bs_ctrl.in_ac = 1'b1; bs_ctrl.ld = 4'b0100;
    @(negedge clk) bs_ctrl.ld = '0; bs_ctrl.xsel = 2'd2; bs_ctrl.ysel = BS_Y_RS; bs_ctrl.op = BS_XOR; bs_ctrl.ld_ac = 1'b1;
    @(negedge clk) bs_ctrl.ld_ac = 1'b0;
    check(bs_ac == 16'h0001, "bit-slice AC = rt xor rs");
  endtask

  // ---------------- RTL sequences ----------------
  task automatic test_sequences();
    @(negedge clk) seq_init = 1'b1; seq_init_r0 = 8'd7; seq_init_r1 = 8'd9; seq_init_acc = 8'd1;
    @(negedge clk) seq_init = 1'b0; seq_start = 1'b1;
    @(negedge clk) seq_start = 1'b0;
    while (seq_busy) @(negedge clk);
    check(seq_done && seq_acc == 8'd15 && seq_r1 == 8'd7 && seq_r0 == 8'd15, "accumulate/swap sequence");
    if (seq_done) mech[M_SEQ_RUN]++;
    abc_start = 1'b1;
    @(negedge clk) abc_start = 1'b0; abc_in = 8'd30;
    @(negedge clk) abc_in = 8'd12;
    @(negedge clk) abc_in = 8'd0;
    while (abc_busy) @(negedge clk);
    check(abc_done && abc_rega == 8'd30 && abc_regb == 8'd42 && abc_regc == 8'd42, "regA/regB/regC sequence");
    if (abc_done) mech[M_ABC_RUN]++;
  endtask

  // ---------------- transfers, interconnect, storage ----------------
  task automatic test_transfers();
    logic [3:0] m [1024];
    @(negedge clk) bt_a = 8'h11; bt_b = 8'h22; bt_sel = 1'b0; bt_ld = 1'b1;
    @(negedge clk) check(bt_c == 8'h11, "C <- A"); if (bt_c == 8'h11) mech[M_BT_A]++; bt_sel = 1'b1;
    @(negedge clk) check(bt_c == 8'h22, "C <- B"); if (bt_c == 8'h22) mech[M_BT_B]++; bt_ld = 1'b0;

    @(negedge clk) ic_init = 1'b1; ic_init_data = {8'd4, 8'd3, 8'd2, 8'd1};
    p2p_sel = {2'd3, 2'd2, 2'd1, 2'd0}; mux_ld = '0; cb_oe = '0; cb_ld = '0; tb2_oe1 = '0; tb2_oe2 = '0; tb2_ld = '0;
    @(negedge clk) ic_init = 1'b0;
    p2p_sel = {2'd3, 2'd2, 2'd0, 2'd1};                 // rs <-> rt
    mux_src = 2'd2; mux_ld = 4'b1011;                    // rd -> rs, rt, R4
    cb_oe = 4'b1000; cb_ld = 4'b0001;                    // R4 -> rs over the bus
    tb2_oe1 = 4'b0001; tb2_oe2 = 4'b0010; tb2_bsel = 4'b0001; tb2_ld = 4'b0011; // rs <-> rt over two busses
    #1 check(cb_bus == 8'd4 && tb2_bus1 == 8'd1 && tb2_bus2 == 8'd2, "bus values");
    @(negedge clk);
    p2p_sel = {2'd3, 2'd2, 2'd1, 2'd0}; mux_ld = '0; cb_oe = '0; cb_ld = '0; tb2_ld = '0; tb2_oe1 = '0; tb2_oe2 = '0;
    check(p2p_regs == {8'd4, 8'd3, 8'd1, 8'd2}, "point-to-point swap"); if (p2p_regs == {8'd4, 8'd3, 8'd1, 8'd2}) mech[M_P2P_SWAP]++;
    check(mux_regs == {8'd3, 8'd3, 8'd3, 8'd3}, "mux fan-out"); if (mux_regs == {8'd3, 8'd3, 8'd3, 8'd3}) mech[M_MUX_FANOUT]++;
    check(cb_regs == {8'd4, 8'd3, 8'd2, 8'd4}, "common bus transfer"); if (cb_regs == {8'd4, 8'd3, 8'd2, 8'd4}) mech[M_CB_TRANSFER]++;
    check(tb2_regs == {8'd4, 8'd3, 8'd1, 8'd2}, "two transfers on two busses"); if (tb2_regs == {8'd4, 8'd3, 8'd1, 8'd2}) mech[M_TB2_DUAL]++;

    reg_d = 8'h3C; reg_ld = 1'b1; reg_oe = 1'b0;
    @(negedge clk) reg_ld = 1'b0;
    check(!reg_q_en && reg_q == 0, "register output disconnected"); if (!reg_q_en && reg_q == 0) mech[M_REG_HIZ]++;
    reg_oe = 1'b1;
    #1 check(reg_q_en && reg_q == 8'h3C, "register output enabled");

    rf_we = 1'b1; rf_wa = 2'd2; rf_d = 4'hA; rf_re = 1'b0;
    @(negedge clk) rf_wa = 2'd1; rf_d = 4'h5; rf_re = 1'b1; rf_ra = 2'd2;   // read 2 while writing 1
    #1 check(rf_q == 4'hA && rf_q_en, "register file read during write"); if (rf_q == 4'hA && rf_q_en) mech[M_RF_RW]++;
    @(negedge clk) rf_we = 1'b0; rf_ra = 2'd1;
    #1 check(rf_q == 4'h5, "register file second word");

    sram_rd = 1'b0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk) sram_wr = 1'b1; sram_a = 10'(i); sram_io_in = 4'($urandom); m[i] = sram_io_in;
      mech[M_SRAM_WR]++;
    end
    @(negedge clk) sram_wr = 1'b0; sram_rd = 1'b1;
    for (int i = 0; i < 200; i++) begin
      sram_a = 10'($urandom);
      #1 check(sram_io_oe && sram_io_out == m[sram_a], "SRAM read"); if (sram_io_oe && sram_io_out == m[sram_a]) mech[M_SRAM_RD]++;
    end
    sram_rd = 1'b0;
  endtask

  initial begin
    foreach (mech[i]) mech[i] = 0;
    rst = 1'b1;
    lp_start = 0; lp_load_en = 0; lp_load_addr = 0; lp_load_data = 0;
    alu_a = 0; alu_b = 0; alu_op = ALU_ADD;
    acc_din = 0; acc_ld_reg = 0; acc_ld_ac = 0; acc_op = ALU_ADD;
    bs_ctrl = '0; bs_mem_in = 0; bs_ci = 0;
    seq_start = 0; seq_init = 0; seq_init_r0 = 0; seq_init_r1 = 0; seq_init_acc = 0;
    abc_start = 0; abc_in = 0;
    bt_a = 0; bt_b = 0; bt_sel = 0; bt_ld = 0;
    ic_init = 0; ic_init_data = '0; p2p_sel = {2'd3, 2'd2, 2'd1, 2'd0}; mux_src = 0; mux_ld = 0;
    cb_oe = 0; cb_ld = 0; tb2_oe1 = 0; tb2_oe2 = 0; tb2_bsel = 0; tb2_ld = 0;
    reg_ld = 0; reg_oe = 0; reg_d = 0;
    rf_re = 0; rf_we = 0; rf_ra = 0; rf_wa = 0; rf_d = 0;
    sram_rd = 0; sram_wr = 0; sram_a = 0; sram_io_in = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    test_list_processor();
    test_alu();
    test_bitslice();
    test_sequences();
    test_transfers();
    for (int i = 0; i < M_COUNT; i++) begin
      $display("mechanism %-18s happened %0d times", mech_e'(i), mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s never happened", mech_e'(i)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
