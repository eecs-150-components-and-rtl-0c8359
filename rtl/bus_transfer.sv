// Register transfer over a shared bus: C <- A or C <- B.
//
// A decoder turns sel into two one-hot enables (sel0 for A, sel1 for B); each
// enable gates its source onto the bus, and the bus is the OR of the gated
// sources (the two-state equivalent of tri-state buffers on a shared wire). C
// loads the bus on the rising clock edge when ld is high. So C <- A is
// sel=0, ld=1 and C <- B is sel=1, ld=1, each taking one clock. The decoder,
// bus and load-enabled destination follow the design; the width and the
// AND-OR bus are local choices.
module bus_transfer #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sel,
  input  logic         ld,
  output logic [W-1:0] bus,
  output logic [W-1:0] c
);

  logic [1:0] en; // decoder outputs Sel0, Sel1

  assign en  = 2'b01 << sel;
  assign bus = ({W{en[0]}} & a) | ({W{en[1]}} & b);

  always_ff @(posedge clk) begin
    if (ld) c <= bus;
  end

endmodule
