// Three-input majority voter, y = M(a, b, c) = ab + bc + ac.
//
// This is the computing primitive of majority-logic nanotechnologies; every
// adder in this design is built from instances of it plus inverters, so that
// the voter count and the voter depth of each unit can be read off the netlist.
// Purely combinational.
module maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  assign y = (a & b) | (b & c) | (a & c);
endmodule
