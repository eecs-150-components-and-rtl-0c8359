// Controller and datapath for regA <- IN; regB <- IN; regC <- regA + regB;
// regB <- regC.
//
// A start pulse (while idle) runs the four transfers in four consecutive
// cycles, one state each: step 1 loads regA from IN, step 2 loads regB from IN
// (the environment presents the second operand on IN by then), step 3 loads
// regC with the sum, step 4 copies regC into regB. busy is high in the four
// steps, done pulses one cycle after step 4. Synchronous reset returns to
// idle. The steps follow the RTL sequence; start/busy/done are local choices.
module rtl_abc_example #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] in_data,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] rega,
  output logic [W-1:0] regb,
  output logic [W-1:0] regc
);

  typedef enum logic [2:0] {IDLE, LOAD_A, LOAD_B, ADD_C, COPY_B} state_e;
  state_e state;
  logic   ld_a, ld_b, ld_c, b_sel;

  assign ld_a  = (state == LOAD_A);
  assign ld_b  = (state == LOAD_B) || (state == COPY_B);
  assign b_sel = (state == COPY_B);
  assign ld_c  = (state == ADD_C);
  assign busy  = (state != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      done  <= 1'b0;
    end else begin
      done <= (state == COPY_B);
      unique case (state)
        IDLE:    if (start) state <= LOAD_A;
        LOAD_A:  state <= LOAD_B;
        LOAD_B:  state <= ADD_C;
        ADD_C:   state <= COPY_B;
        default: state <= IDLE;
      endcase
    end
  end

  rtl_abc_datapath #(.W(W)) u_dp (
    .clk, .in_data, .ld_a, .ld_b, .ld_c, .b_sel, .rega, .regb, .regc
  );

endmodule
