// Four-bit approximate recoding adder (ARA) for 7A = 8A + ~A + 1.
//
// One 4-bit slice at position i adds ~a_{i+3}+a_i, ~a_{i+2}+a_{i-1},
// ~a_{i+1}+a_{i-2} and ~a_i+a_{i-3}+cin. The exact slice sum is regrouped as
//   16a_i + 8(~a_{i+3} + a_{i-1} - a_i) + 4(~a_{i+2} + a_{i-2} - a_{i-1})
//         + 2(~a_{i+1} + a_{i-3} - a_{i-2}) + (cin + ~a_i - a_{i-3})
// and every bracket is rounded into one bit with a voter:
//   cout = a_i,
//   s[3] = M(~a_{i+3}, a_{i-1}, ~a_i),   s[2] = M(~a_{i+2}, a_{i-2}, ~a_{i-1}),
//   s[1] = M(~a_{i+1}, a_{i-3}, ~a_{i-2}), s[0] = M(cin, ~a_i, ~a_{i-3}).
// Four voters, one voter delay, no carry propagation; wrong in 176 of the 256
// input combinations. The inputs are the true bits of A: the inversion of -A
// is done inside. Follows the published ARA; the vector packing is this
// design's choice. Combinational.
module ara4 (
  input  logic [6:0] a,     // {a_{i+3}, a_{i+2}, a_{i+1}, a_i, a_{i-1}, a_{i-2}, a_{i-3}}
  input  logic       cin,
  output logic [3:0] s,     // {S_{i+3}, S_{i+2}, S_{i+1}, S_i}
  output logic       cout
);
  assign cout = a[3];
  maj3 u_s3 (.a(~a[6]), .b(a[2]),  .c(~a[3]), .y(s[3]));
  maj3 u_s2 (.a(~a[5]), .b(a[1]),  .c(~a[2]), .y(s[2]));
  maj3 u_s1 (.a(~a[4]), .b(a[0]),  .c(~a[1]), .y(s[1]));
  maj3 u_s0 (.a(cin),   .b(~a[3]), .c(~a[0]), .y(s[0]));
endmodule
