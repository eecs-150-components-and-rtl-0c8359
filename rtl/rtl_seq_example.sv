// Controller and datapath for the RTL sequence
//   ACC <- ACC + R0, R1 <- R0;  ACC <- ACC + R1, R0 <- R1;  R0 <- ACC;
//
// A start pulse (while idle) runs the three steps in three consecutive clock
// cycles, one state per step; each state's outputs are the mux selects and the
// ACC load for that step. busy is high during the three steps and done pulses
// for one cycle after the last. init loads the registers (see the datapath).
// Synchronous reset returns to idle. The states follow the RTL sequence one to
// one; start/busy/done are local choices.
module rtl_seq_example #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic         init,
  input  logic [W-1:0] init_r0,
  input  logic [W-1:0] init_r1,
  input  logic [W-1:0] init_acc,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] r0,
  output logic [W-1:0] r1,
  output logic [W-1:0] acc
);

  typedef enum logic [1:0] {IDLE, STEP1, STEP2, STEP3} state_e;
  state_e state;
  logic   s0, s1, s2, s3, ld_acc;

  always_comb begin
    // Default: registers hold.
    s0 = 1'b1; s1 = 1'b1; s2 = 1'b0; s3 = 1'b0; ld_acc = 1'b0;
    unique case (state)
      STEP1: begin s2 = 1'b0; ld_acc = 1'b1; s3 = 1'b0; s1 = 1'b0; end // ACC+=R0, R1<=R0
      STEP2: begin s2 = 1'b1; ld_acc = 1'b1; s3 = 1'b0; s0 = 1'b0; end // ACC+=R1, R0<=R1
      STEP3: begin s3 = 1'b1; s0 = 1'b0; end                           // R0<=ACC
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      done  <= 1'b0;
    end else begin
      done <= (state == STEP3);
      unique case (state)
        IDLE:    if (start) state <= STEP1;
        STEP1:   state <= STEP2;
        STEP2:   state <= STEP3;
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  rtl_seq_datapath #(.W(W)) u_dp (
    .clk, .s0, .s1, .s2, .s3, .ld_acc, .init, .init_r0, .init_r1, .init_acc,
    .r0, .r1, .acc
  );

endmodule
