// Exact majority-logic full adder: 2*cout + s = a + b + cin.
//
// cout = M(a, b, cin) and s = M(~cout, M(a, b, ~cin), cin): three voters and two
// inverters, one voter delay to cout and two to s. This is the standard
// majority-logic full adder; combinational.
module ml_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic m_inner;

  maj3 u_carry (.a(a),     .b(b), .c(cin),  .y(cout));
  maj3 u_inner (.a(a),     .b(b), .c(~cin), .y(m_inner));
  maj3 u_sum   (.a(~cout), .b(m_inner), .c(cin), .y(s));
endmodule
