// Register file of WORDS words x W bits (default 4 x 4, 16 flip-flops).
//
// Separate read and write addresses allow a read and a write in the same
// cycle. Write: on the rising edge with we high, d is stored in word wa
// ({WB,WA}). Read: combinational; with re high q shows word ra ({RB,RA}) and
// q_en is high, with re low the output is disconnected (q_en low, q = 0). A
// read of the word being written shows the old value until the edge. The
// ports follow the design's 4 x 4 register file; the bit order of the address
// pins and the q_en representation of the read enable are local choices.
module regfile4x4 #(
  parameter int unsigned WORDS = 4,
  parameter int unsigned W     = 4,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] ra,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  d,
  output logic [W-1:0]  q,
  output logic          q_en
);

  logic [W-1:0] rf [WORDS];

  always_ff @(posedge clk) begin
    if (we) rf[wa] <= d;
  end

  assign q    = re ? rf[ra] : '0;
  assign q_en = re;

endmodule
