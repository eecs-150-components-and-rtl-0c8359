// N-bit ripple-carry adder: N identical full-adder stages, bit i's carry out
// feeding bit i+1's carry in. sum = a + b + cin modulo 2**N, cout the carry
// out of the top bit. Purely combinational; the delay grows linearly with N.
// The iterative build from identical 1-bit cells follows the design; the
// default width of 16 matches the ALU.
module ripple_adder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    full_adder u_fa (.ain(a[i]), .bin(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end

  assign cout = c[N];

endmodule
