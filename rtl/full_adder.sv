// Full adder built from two half adders.
//
// The first half adder adds bin and cin; the second adds ain to that partial
// sum, giving sum. The two half-adder carries are merged into cout; at most one
// of them can be 1, so an OR merges them. This two-half-adder structure follows
// the design's adder hierarchy; the merging gate is a local choice.
// Purely combinational.
module full_adder (
  input  logic ain,
  input  logic bin,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic s1, c1, c2;

  half_adder u_ha_bc (.a(bin), .b(cin), .s(s1),  .c(c1));
  half_adder u_ha_a  (.a(ain), .b(s1),  .s(sum), .c(c2));

  assign cout = c1 | c2;

endmodule
