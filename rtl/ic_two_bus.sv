// Two-bus interconnect: two transfers per cycle.
//
// Registers regs[0..3] are rs, rt, rd and R4. Each register can drive bus 1
// (oe1) and bus 2 (oe2); each bus is the OR of its enabled drivers (two-state
// model of a tri-state bus, at most one driver per bus, checked by
// assertions). Each register has a 2:1 mux choosing bus 1 (bsel=0) or bus 2
// (bsel=1) and loads it on the rising edge when its ld bit is high. So two
// different values can move in one cycle, one per bus. init (a local
// addition) loads init_data and has priority. One transfer per bus and the
// per-register bus mux follow the design.
module ic_two_bus #(
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic                init,
  input  logic [3:0][W-1:0]   init_data,
  input  logic [3:0]          oe1,
  input  logic [3:0]          oe2,
  input  logic [3:0]          bsel,
  input  logic [3:0]          ld,
  output logic [W-1:0]        bus1,
  output logic [W-1:0]        bus2,
  output logic [3:0][W-1:0]   regs
);

  always_comb begin
    bus1 = '0;
    bus2 = '0;
    for (int i = 0; i < 4; i++) begin
      bus1 |= {W{oe1[i]}} & regs[i];
      bus2 |= {W{oe2[i]}} & regs[i];
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      if (init)       regs[i] <= init_data[i];
      else if (ld[i]) regs[i] <= bsel[i] ? bus2 : bus1;
    end
  end

  a_one_driver1: assert property (@(posedge clk) $onehot0(oe1));
  a_one_driver2: assert property (@(posedge clk) $onehot0(oe2));

endmodule
