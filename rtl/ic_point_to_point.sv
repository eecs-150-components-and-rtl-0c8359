// Point-to-point interconnect of four registers.
//
// Registers regs[0..3] are rs, rt, rd and R4. Every register has its own 4:1
// mux over the four register outputs, on dedicated wires, and loads the mux
// output on every rising edge: sel[i] names the register whose value register
// i takes (sel[i] = i holds). Any permutation of transfers can thus happen in
// one cycle. init (a local addition) loads init_data into all four registers
// and has priority. The dedicated-mux structure follows the design.
module ic_point_to_point #(
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic                init,
  input  logic [3:0][W-1:0]   init_data,
  input  logic [3:0][1:0]     sel,
  output logic [3:0][W-1:0]   regs
);

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      regs[i] <= init ? init_data[i] : regs[sel[i]];
    end
  end

endmodule
