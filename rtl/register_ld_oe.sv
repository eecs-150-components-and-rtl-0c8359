// W-bit register (default 8) with load enable and output enable.
//
// On a rising clock edge with ld high the flip-flops take d. With oe high the
// stored value appears on q and q_en is high; with oe low the outputs are
// disconnected, which this two-state model shows as q_en low and q = 0 (a
// pad or bus would turn q_en into a tri-state enable). LD, OE, D7..D0, Q7..Q0
// and CLK follow the design; the q_en representation of high impedance is a
// local choice. No reset.
module register_ld_oe #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         ld,
  input  logic         oe,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         q_en
);

  logic [W-1:0] ff;

  always_ff @(posedge clk) begin
    if (ld) ff <= d;
  end

  assign q    = oe ? ff : '0;
  assign q_en = oe;

endmodule
