// One bit slice of the bit-slice datapath.
//
// Holds one bit of AC and of the registers R0, rs, rt, rd. Three bit busses
// run through the slice: the input bus (memory bit or AC bit, chosen by
// ctrl.in_ac) that registers load from, the X bus (one register, ctrl.xsel)
// and the Y bus (one register or AC, ctrl.ysel). The 1-bit ALU combines X and
// Y: ADD uses ci and produces co for the next slice; AND, OR and XOR give co=0.
// On the rising edge registers with ctrl.ld set take the input bus and AC takes
// the ALU output if ctrl.ld_ac. Synchronous reset clears all bits.
// The register set, the AC and the carry chain follow the design; the bus
// select codes and the slice's operations are local choices.
module bitslice
  import rtl150_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  bs_ctrl_t ctrl,
  input  logic     mem_in,
  input  logic     ci,
  output logic     co,
  output logic     ac,
  output logic     bus_x
);

  logic [3:0] r;      // R0, rs, rt, rd
  logic       bus_in, bus_y, alu_o;

  assign bus_in = ctrl.in_ac ? ac : mem_in;
  assign bus_x  = r[ctrl.xsel];

  always_comb begin
    unique case (ctrl.ysel)
      BS_Y_R0: bus_y = r[0];
      BS_Y_RS: bus_y = r[1];
      BS_Y_RT: bus_y = r[2];
      BS_Y_RD: bus_y = r[3];
      BS_Y_AC: bus_y = ac;
      default: bus_y = ac;
    endcase
  end

  always_comb begin
    co = 1'b0;
    unique case (ctrl.op)
      BS_ADD: begin
        alu_o = bus_x ^ bus_y ^ ci;
        co    = (bus_x & bus_y) | (ci & (bus_x ^ bus_y));
      end
      BS_AND:  alu_o = bus_x & bus_y;
      BS_OR:   alu_o = bus_x | bus_y;
      BS_XOR:  alu_o = bus_x ^ bus_y;
      default: alu_o = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      r  <= '0;
      ac <= 1'b0;
    end else begin
      for (int i = 0; i < 4; i++) if (ctrl.ld[i]) r[i] <= bus_in;
      if (ctrl.ld_ac) ac <= alu_o;
    end
  end

endmodule
