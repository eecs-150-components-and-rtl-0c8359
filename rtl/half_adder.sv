// Half adder: adds two bits. s = a xor b is the sum bit, c = a and b the carry.
// Purely combinational. It is the leaf of the adder hierarchy (half adder ->
// full adder -> ripple-carry adder -> ALU).
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  assign s = a ^ b;
  assign c = a & b;

endmodule
