// Memory of the list processor: 2**AW words of DW bits, one address port.
//
// Reads are asynchronous: d follows a combinationally, as the list processor
// expects of its memory (it reads and uses a word in the same cycle). There is
// one address port only, shared by reads and writes. A write (we high) stores
// wd at address a on the rising clock edge; the write port is this design's
// addition so that lists can be loaded, and the read value during a write
// cycle is the old word. 256 x 8 follows the 8-bit address and data ports of
// the list processor. Contents are not initialised.
module lp_memory #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] a,
  output logic [DW-1:0] d,
  input  logic          we,
  input  logic [DW-1:0] wd
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[a] <= wd;
  end

  assign d = mem[a];

endmodule
