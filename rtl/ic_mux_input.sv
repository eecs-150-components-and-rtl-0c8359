// Common-input interconnect: one 4:1 mux feeds all four registers.
//
// Registers regs[0..3] are rs, rt, rd and R4. src selects which register drives
// the common input; every register whose ld bit is high loads it on the rising
// edge, so one value moves per cycle, to one or more destinations. init (a
// local addition) loads init_data into all four and has priority. The shared
// mux with per-register load enables follows the design.
module ic_mux_input #(
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic                init,
  input  logic [3:0][W-1:0]   init_data,
  input  logic [1:0]          src,
  input  logic [3:0]          ld,
  output logic [3:0][W-1:0]   regs
);

  logic [W-1:0] common;

  assign common = regs[src];

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      if (init)       regs[i] <= init_data[i];
      else if (ld[i]) regs[i] <= common;
    end
  end

endmodule
