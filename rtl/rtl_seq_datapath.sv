// Datapath for the three-step accumulate-and-swap RTL sequence.
//
// Registers R0, R1 and ACC (W bits). Mux S2 puts R0 (0) or R1 (1) on the
// adder's second input; the adder forms ACC + S2-output. Mux S3 drives the
// register input bus with the S2 output (0) or ACC (1). Mux S0 loads R0 from
// that bus (0) or keeps R0 (1); S1 does the same for R1. ACC loads the adder
// output when ld_acc is high. init loads init_r0/init_r1/init_acc and has
// priority. Everything changes on the rising clock edge.
// The mux numbering and their inputs follow the design's datapath diagram;
// the ACC load enable and the init port are local additions (ACC must hold in
// the step where only R0 is written).
module rtl_seq_datapath #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         s0,
  input  logic         s1,
  input  logic         s2,
  input  logic         s3,
  input  logic         ld_acc,
  input  logic         init,
  input  logic [W-1:0] init_r0,
  input  logic [W-1:0] init_r1,
  input  logic [W-1:0] init_acc,
  output logic [W-1:0] r0,
  output logic [W-1:0] r1,
  output logic [W-1:0] acc
);

  logic [W-1:0] s2_o, bus, sum;

  assign s2_o = s2 ? r1 : r0;
  assign sum  = acc + s2_o;
  assign bus  = s3 ? acc : s2_o;

  always_ff @(posedge clk) begin
    if (init) begin
      r0  <= init_r0;
      r1  <= init_r1;
      acc <= init_acc;
    end else begin
      r0 <= s0 ? r0 : bus;
      r1 <= s1 ? r1 : bus;
      if (ld_acc) acc <= sum;
    end
  end

endmodule
