// Two-bit approximate recoding adder (ARA) for the triple multiplicand.
//
// One 2-bit slice at position i of A + 2A adds a_{i+1}+a_i at weight 2^{i+1}
// and a_i+a_{i-1}+cin at weight 2^i. Rewriting the exact sum as
// 4a_i + 2a_{i+1} + (cin + a_{i-1} - a_i) and rounding the last term into one
// bit gives a slice with no carry propagation:
//   cout = a_i,  s[1] = a_{i+1},  s[0] = M(cin, a_{i-1}, ~a_i).
// One voter, one voter delay. The result is off by +2^i when
// {cin, a_{i-1}, a_i} = {0,0,1} and by -2^i when it is {1,1,0}, in 4 of the
// 16 input combinations. All of this follows the published ARA; only the
// packing of the input bits into a vector is this design's choice.
// Combinational.
module ara2 (
  input  logic [2:0] a,     // {a_{i+1}, a_i, a_{i-1}}
  input  logic       cin,   // carry in from the slice below
  output logic [1:0] s,     // {S_{i+1}, S_i}
  output logic       cout   // approximate carry out
);
  assign cout = a[1];
  assign s[1] = a[2];
  maj3 u_s0 (.a(cin), .b(a[0]), .c(~a[1]), .y(s[0]));
endmodule
