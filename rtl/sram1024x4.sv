// Static RAM of 2**AW words x W bits (default 1024 x 4).
//
// The bidirectional data pins IO are split into io_in (driven by the outside
// when writing), io_out and io_oe (driven by the RAM when reading). Read: with
// rd high and wr low, io_out shows word a combinationally and io_oe is high.
// Write: with wr high, io_in is stored in word a on the rising clock edge, and
// the RAM does not drive IO. The contents persist until overwritten and are
// not initialised. RD/WR, A9..A0 and the 1024 x 4 organisation follow the
// design; the clocked write (the part writes asynchronously) and the split
// data pins are local choices that keep the model synthesizable.
module sram1024x4 #(
  parameter int unsigned AW = 10,
  parameter int unsigned W  = 4
) (
  input  logic          clk,
  input  logic          rd,
  input  logic          wr,
  input  logic [AW-1:0] a,
  input  logic [W-1:0]  io_in,
  output logic [W-1:0]  io_out,
  output logic          io_oe
);

  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (wr) mem[a] <= io_in;
  end

  assign io_oe  = rd && !wr;
  assign io_out = io_oe ? mem[a] : '0;

endmodule
