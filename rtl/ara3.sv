// Three-bit approximate recoding adder (ARA) for 5A = A + 4A.
//
// One 3-bit slice at position i adds a_{i+2}+a_i, a_{i+1}+a_{i-1} and
// a_i+a_{i-2}+cin. With 5*2^i*a_i = 2^{i+3}a_i - 2^{i+1}a_i - 2^i*a_i the exact
// slice sum becomes
//   8a_i + 4a_{i+2} + 2(a_{i+1} + a_{i-1} - a_i) + (a_{i-2} + cin - a_i),
// and each bracket is rounded into one bit with a voter:
//   cout = a_i, s[2] = a_{i+2}, s[1] = M(a_{i+1}, a_{i-1}, ~a_i),
//   s[0] = M(a_{i-2}, cin, ~a_i).
// Two voters, one voter delay, no carry propagation; wrong in 28 of the 64
// input combinations. Follows the published ARA; the vector packing is this
// design's choice. Combinational.
module ara3 (
  input  logic [4:0] a,     // {a_{i+2}, a_{i+1}, a_i, a_{i-1}, a_{i-2}}
  input  logic       cin,
  output logic [2:0] s,     // {S_{i+2}, S_{i+1}, S_i}
  output logic       cout
);
  assign cout = a[2];
  assign s[2] = a[4];
  maj3 u_s1 (.a(a[3]), .b(a[1]), .c(~a[2]), .y(s[1]));
  maj3 u_s0 (.a(a[0]), .b(cin),  .c(~a[2]), .y(s[0]));
endmodule
