// Approximate high-radix Booth multipliers built on majority-logic approximate
// recoding adders (ARAs): a signed N x N radix-8 multiplier and a signed
// N x N radix-16 multiplier side by side, each with its own operand ports.
//
// High-radix Booth recoding halves or thirds the number of partial products,
// but needs odd multiples of the multiplicand (3A; 3A, 5A and 7A), which
// normally take a full carry-propagate adder. Here the low-order bits of each
// odd multiple come from carry-free ARAs, one majority voter deep, and only
// the upper bits use an exact majority-logic ripple-carry adder. The odd
// multiples are brought out so the approximation can be observed.
// Defaults are the preferred 16-bit configuration: P3 = 5 two-bit ARAs for 3A,
// P5 = 3 three-bit ARAs for 5A and P7 = 2 four-bit ARAs for 7A. Both
// multipliers are purely combinational: no clock, no reset, results valid one
// propagation delay after the inputs.
module ml_ara_booth_top
  import ml_ara_pkg::*;
#(
  parameter int unsigned N  = N_DEFAULT,
  parameter int unsigned P3 = P3_DEFAULT,
  parameter int unsigned P5 = P5_DEFAULT,
  parameter int unsigned P7 = P7_DEFAULT
) (
  // radix-8 multiplier
  input  logic [N-1:0]   r8_a,
  input  logic [N-1:0]   r8_b,
  output logic [2*N-1:0] r8_p,
  output logic [N+1:0]   r8_a3,
  // radix-16 multiplier
  input  logic [N-1:0]   r16_a,
  input  logic [N-1:0]   r16_b,
  output logic [2*N-1:0] r16_p,
  output logic [N+1:0]   r16_a3,
  output logic [N+2:0]   r16_a5,
  output logic [N+2:0]   r16_a7
);
  booth_r8_mult #(.N(N), .P3(P3)) u_r8 (
    .a(r8_a), .b(r8_b), .p(r8_p), .a3(r8_a3)
  );

  booth_r16_mult #(.N(N), .P3(P3), .P5(P5), .P7(P7)) u_r16 (
    .a(r16_a), .b(r16_b), .p(r16_p), .a3(r16_a3), .a5(r16_a5), .a7(r16_a7)
  );
endmodule
