// Shared constants and types for the majority-logic approximate recoding adder
// (ARA) Booth multipliers.
//
// The defaults describe the preferred 16-bit configuration: 5 two-bit ARAs in the
// 3A generator, 3 three-bit ARAs in the 5A generator and 2 four-bit ARAs in the
// 7A generator. The Booth digit types hold a signed recoded digit as a magnitude
// and a sign, which is how the partial-product selectors use them.
package ml_ara_pkg;

  localparam int unsigned N_DEFAULT  = 16;  // operand width n
  localparam int unsigned P3_DEFAULT = 5;   // 2-bit ARAs in the 3A generator
  localparam int unsigned P5_DEFAULT = 3;   // 3-bit ARAs in the 5A generator
  localparam int unsigned P7_DEFAULT = 2;   // 4-bit ARAs in the 7A generator

  // Radix-8 digit: value in -4..4
  typedef struct packed {
    logic       neg;  // digit is negative
    logic [2:0] mag;  // |digit|, 0..4
  } r8_digit_t;

  // Radix-16 digit: value in -8..8
  typedef struct packed {
    logic       neg;
    logic [3:0] mag;  // |digit|, 0..8
  } r16_digit_t;

  // Number of Booth digits for a signed n-bit multiplier in radix 2^r
  function automatic int unsigned booth_digits(int unsigned n, int unsigned r);
    return (n + r - 1) / r;
  endfunction

endpackage
