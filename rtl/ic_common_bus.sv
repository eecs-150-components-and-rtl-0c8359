// Common-bus interconnect with output enables and load enables.
//
// Registers regs[0..3] are rs, rt, rd and R4. A register whose oe bit is high
// drives the bus; the bus is the OR of the enabled registers (two-state model
// of a tri-state bus, so at most one oe may be high, checked by an assertion;
// no enable leaves the bus at 0). Registers whose ld bit is high load the bus
// on the rising edge. init (a local addition) loads init_data and has
// priority. Output and load enables per register follow the design.
module ic_common_bus #(
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic                init,
  input  logic [3:0][W-1:0]   init_data,
  input  logic [3:0]          oe,
  input  logic [3:0]          ld,
  output logic [W-1:0]        bus,
  output logic [3:0][W-1:0]   regs
);

  always_comb begin
    bus = '0;
    for (int i = 0; i < 4; i++) bus |= {W{oe[i]}} & regs[i];
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      if (init)       regs[i] <= init_data[i];
      else if (ld[i]) regs[i] <= bus;
    end
  end

  a_one_driver: assert property (@(posedge clk) $onehot0(oe));

endmodule
