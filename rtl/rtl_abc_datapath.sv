// Datapath for the RTL sequence regA <- IN; regB <- IN; regC <- regA + regB;
// regB <- regC.
//
// IN fans out to regA and to the regB input mux; regA and regB feed an adder
// whose output goes to regC; the regB mux selects IN (b_sel=0) or regC
// (b_sel=1). Each register loads on the rising edge when its load enable is
// high. This structure is exactly what the RTL sequence requires; the width is
// a local choice. No reset: the sequence writes every register before use.
module rtl_abc_datapath #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic [W-1:0] in_data,
  input  logic         ld_a,
  input  logic         ld_b,
  input  logic         ld_c,
  input  logic         b_sel,
  output logic [W-1:0] rega,
  output logic [W-1:0] regb,
  output logic [W-1:0] regc
);

  always_ff @(posedge clk) begin
    if (ld_a) rega <= in_data;
    if (ld_b) regb <= b_sel ? regc : in_data;
    if (ld_c) regc <= rega + regb;
  end

endmodule
