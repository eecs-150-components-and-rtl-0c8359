// N-bit datapath built by iterating the bit slice N times.
//
// Every slice gets the same controls; slice i handles bit i of the memory word
// and of every register. The carry runs from ci into slice 0 and from slice i
// to slice i+1; co is the carry out of the top slice. So with op = ADD the
// datapath computes AC <- X + Y + ci over all N bits, and the logic operations
// work bitwise. Timing as for one slice: one register transfer per clock.
// The iteration and carry chain follow the design; N = 16 is a local choice.
module bitslice_datapath
  import rtl150_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  bs_ctrl_t     ctrl,
  input  logic [N-1:0] mem_in,
  input  logic         ci,
  output logic         co,
  output logic [N-1:0] ac,
  output logic [N-1:0] bus_x
);

  logic [N:0] c;

  assign c[0] = ci;

  for (genvar i = 0; i < N; i++) begin : g_slice
    bitslice u_slice (
      .clk, .rst, .ctrl, .mem_in(mem_in[i]), .ci(c[i]), .co(c[i+1]),
      .ac(ac[i]), .bus_x(bus_x[i])
    );
  end

  assign co = c[N];

endmodule
