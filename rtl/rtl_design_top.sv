// Top level: the linked-list summing processor and the smaller example
// datapaths, side by side.
//
// The designs are independent; each keeps its own ports, prefixed by design:
//   lp_*    list processor with its 256 x 8 memory (START, DONE, R, load port)
//   alu_*   16-bit ALU (built on the ripple-carry adder / full / half adders)
//   acc_*   accumulator datapath (AC <- AC op REG)
//   bs_*    16-bit bit-slice datapath
//   seq_*   three-step accumulate/swap RTL sequence (controller + datapath)
//   abc_*   four-step regA/regB/regC RTL sequence (controller + datapath)
//   bt_*    decoder-driven bus transfer into register C
//   p2p_*, mux_*, cb_*, tb2_*   the four register interconnect styles
//   reg_*   8-bit register with LD and OE
//   rf_*    4 x 4 register file
//   sram_*  1024 x 4 static RAM
// All clocked parts share clk; rst is a synchronous reset for the designs that
// have one. Every parameter keeps its default. Timing is that of each block.
module rtl_design_top
  import rtl150_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // list processor system
  input  logic              lp_start,
  output logic              lp_done,
  output logic [7:0]        lp_r,
  input  logic              lp_load_en,
  input  logic [7:0]        lp_load_addr,
  input  logic [7:0]        lp_load_data,
  // ALU
  input  logic [15:0]       alu_a,
  input  logic [15:0]       alu_b,
  input  alu_op_e           alu_op,
  output logic [15:0]       alu_s,
  output logic              alu_n,
  output logic              alu_z,
  // accumulator datapath
  input  logic [15:0]       acc_din,
  input  logic              acc_ld_reg,
  input  logic              acc_ld_ac,
  input  alu_op_e           acc_op,
  output logic [15:0]       acc_ac,
  output logic [15:0]       acc_result,
  output logic              acc_n,
  output logic              acc_z,
  // bit-slice datapath
  input  bs_ctrl_t          bs_ctrl,
  input  logic [15:0]       bs_mem_in,
  input  logic              bs_ci,
  output logic              bs_co,
  output logic [15:0]       bs_ac,
  output logic [15:0]       bs_bus_x,
  // RTL sequence example
  input  logic              seq_start,
  input  logic              seq_init,
  input  logic [7:0]        seq_init_r0,
  input  logic [7:0]        seq_init_r1,
  input  logic [7:0]        seq_init_acc,
  output logic              seq_busy,
  output logic              seq_done,
  output logic [7:0]        seq_r0,
  output logic [7:0]        seq_r1,
  output logic [7:0]        seq_acc,
  // regA/regB/regC example
  input  logic              abc_start,
  input  logic [7:0]        abc_in,
  output logic              abc_busy,
  output logic              abc_done,
  output logic [7:0]        abc_rega,
  output logic [7:0]        abc_regb,
  output logic [7:0]        abc_regc,
  // bus transfer
  input  logic [7:0]        bt_a,
  input  logic [7:0]        bt_b,
  input  logic              bt_sel,
  input  logic              bt_ld,
  output logic [7:0]        bt_bus,
  output logic [7:0]        bt_c,
  // interconnect styles
  input  logic              ic_init,
  input  logic [3:0][7:0]   ic_init_data,
  input  logic [3:0][1:0]   p2p_sel,
  output logic [3:0][7:0]   p2p_regs,
  input  logic [1:0]        mux_src,
  input  logic [3:0]        mux_ld,
  output logic [3:0][7:0]   mux_regs,
  input  logic [3:0]        cb_oe,
  input  logic [3:0]        cb_ld,
  output logic [7:0]        cb_bus,
  output logic [3:0][7:0]   cb_regs,
  input  logic [3:0]        tb2_oe1,
  input  logic [3:0]        tb2_oe2,
  input  logic [3:0]        tb2_bsel,
  input  logic [3:0]        tb2_ld,
  output logic [7:0]        tb2_bus1,
  output logic [7:0]        tb2_bus2,
  output logic [3:0][7:0]   tb2_regs,
  // register with LD/OE
  input  logic              reg_ld,
  input  logic              reg_oe,
  input  logic [7:0]        reg_d,
  output logic [7:0]        reg_q,
  output logic              reg_q_en,
  // register file
  input  logic              rf_re,
  input  logic [1:0]        rf_ra,
  input  logic              rf_we,
  input  logic [1:0]        rf_wa,
  input  logic [3:0]        rf_d,
  output logic [3:0]        rf_q,
  output logic              rf_q_en,
  // SRAM
  input  logic              sram_rd,
  input  logic              sram_wr,
  input  logic [9:0]        sram_a,
  input  logic [3:0]        sram_io_in,
  output logic [3:0]        sram_io_out,
  output logic              sram_io_oe
);

  lp_system u_lp (
    .clk, .rst, .start(lp_start), .done(lp_done), .r(lp_r),
    .load_en(lp_load_en), .load_addr(lp_load_addr), .load_data(lp_load_data)
  );

  alu u_alu (.a(alu_a), .b(alu_b), .op(alu_op), .s(alu_s), .n(alu_n), .z(alu_z));

  acc_datapath u_acc (
    .clk, .rst, .din(acc_din), .ld_reg(acc_ld_reg), .ld_ac(acc_ld_ac), .op(acc_op),
    .ac(acc_ac), .result(acc_result), .n(acc_n), .z(acc_z)
  );

  bitslice_datapath u_bs (
    .clk, .rst, .ctrl(bs_ctrl), .mem_in(bs_mem_in), .ci(bs_ci), .co(bs_co),
    .ac(bs_ac), .bus_x(bs_bus_x)
  );

  rtl_seq_example u_seq (
    .clk, .rst, .start(seq_start), .init(seq_init), .init_r0(seq_init_r0),
    .init_r1(seq_init_r1), .init_acc(seq_init_acc), .busy(seq_busy), .done(seq_done),
    .r0(seq_r0), .r1(seq_r1), .acc(seq_acc)
  );

  rtl_abc_example u_abc (
    .clk, .rst, .start(abc_start), .in_data(abc_in), .busy(abc_busy), .done(abc_done),
    .rega(abc_rega), .regb(abc_regb), .regc(abc_regc)
  );

  bus_transfer u_bt (
    .clk, .a(bt_a), .b(bt_b), .sel(bt_sel), .ld(bt_ld), .bus(bt_bus), .c(bt_c)
  );

  ic_point_to_point u_p2p (
    .clk, .init(ic_init), .init_data(ic_init_data), .sel(p2p_sel), .regs(p2p_regs)
  );

  ic_mux_input u_mux (
    .clk, .init(ic_init), .init_data(ic_init_data), .src(mux_src), .ld(mux_ld),
    .regs(mux_regs)
  );

  ic_common_bus u_cb (
    .clk, .init(ic_init), .init_data(ic_init_data), .oe(cb_oe), .ld(cb_ld),
    .bus(cb_bus), .regs(cb_regs)
  );

  ic_two_bus u_tb2 (
    .clk, .init(ic_init), .init_data(ic_init_data), .oe1(tb2_oe1), .oe2(tb2_oe2),
    .bsel(tb2_bsel), .ld(tb2_ld), .bus1(tb2_bus1), .bus2(tb2_bus2), .regs(tb2_regs)
  );

  register_ld_oe u_reg (
    .clk, .ld(reg_ld), .oe(reg_oe), .d(reg_d), .q(reg_q), .q_en(reg_q_en)
  );

  regfile4x4 u_rf (
    .clk, .re(rf_re), .ra(rf_ra), .we(rf_we), .wa(rf_wa), .d(rf_d), .q(rf_q),
    .q_en(rf_q_en)
  );

  sram1024x4 u_sram (
    .clk, .rd(sram_rd), .wr(sram_wr), .a(sram_a), .io_in(sram_io_in),
    .io_out(sram_io_out), .io_oe(sram_io_oe)
  );

endmodule
