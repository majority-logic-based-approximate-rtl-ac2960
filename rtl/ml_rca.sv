// Exact M-bit ripple-carry adder of majority-logic full adders:
// {cout, s} = x + y + cin.
//
// It uses 3*M voters and has a depth of M+1 voters. In the odd-multiple
// generators it computes the upper, exact part of the sum, taking as carry in
// the approximate carry out of the highest approximate recoding adder.
// Combinational. The width M is set by the instantiating generator.
module ml_rca #(
  parameter int unsigned M = 8
) (
  input  logic [M-1:0] x,
  input  logic [M-1:0] y,
  input  logic         cin,
  output logic [M-1:0] s,
  output logic         cout
);
  logic [M:0] c;

  assign c[0] = cin;
  for (genvar j = 0; j < M; j++) begin : g_fa
    ml_full_adder u_fa (.a(x[j]), .b(y[j]), .cin(c[j]), .s(s[j]), .cout(c[j+1]));
  end
  assign cout = c[M];
endmodule
