// Signed N x N radix-8 Booth multiplier whose triple multiplicand comes from the
// approximate 3A generator (odd3_gen), so that 3A costs no long carry chain.
//
// Operation: B is recoded into ceil(N/3) digits d_k = -4b_{3k+2} + 2b_{3k+1}
// + b_{3k} + b_{3k-1}, each in -4..4 (b_{-1} = 0, B sign-extended above bit N-1).
// Each digit selects 0, A, 2A, 3A or 4A. 2A and 4A are shifts, and 3A is the
// approximate one. The selected multiple is negated for a negative digit. The
// partial products are summed at weights 8^k. The result is the 2N-bit
// two's-complement product. It is exact except for the error of 3A, which is
// carried into every partial product that selects +-3A.
// The recoding and the use of the ARA-based 3A follow the published design.
// The partial products are negated in exact two's complement and added with a
// plain sum, left to synthesis. That accumulation is this design's own choice,
// as the published design leaves it open. Purely combinational.
module booth_r8_mult
  import ml_ara_pkg::*;
#(
  parameter int unsigned N  = N_DEFAULT,
  parameter int unsigned P3 = P3_DEFAULT
) (
  input  logic [N-1:0]   a,   // multiplicand, two's complement
  input  logic [N-1:0]   b,   // multiplier, two's complement
  output logic [2*N-1:0] p,   // approximate product
  output logic [N+1:0]   a3   // approximate 3A in use
);
  localparam int unsigned ND = booth_digits(N, 3);
  localparam int unsigned WB = 3*ND + 1;   // recoded multiplier incl. b_{-1}
  localparam int unsigned WP = 2*N;

  odd3_gen #(.N(N), .P(P3)) u_odd3 (.a(a), .a3(a3));

  logic [WB-1:0]  bx;
  r8_digit_t      dig [ND];
  logic [WP-1:0]  mult [5];     // 0, A, 2A, 3A, 4A
  logic [WP-1:0]  pp   [ND];

  assign bx = {{(WB-N-1){b[N-1]}}, b, 1'b0};

  assign mult[0] = '0;
  assign mult[1] = WP'(signed'(a));
  assign mult[2] = WP'(signed'(a)) << 1;
  assign mult[3] = WP'(signed'(a3));
  assign mult[4] = WP'(signed'(a)) << 2;

  // Booth recoding of four adjacent multiplier bits into sign and magnitude
  function automatic r8_digit_t recode8(logic [3:0] g);
    int v;
    r8_digit_t d;
    v = -4*int'(g[3]) + 2*int'(g[2]) + int'(g[1]) + int'(g[0]);
    d.neg = (v < 0);
    d.mag = 3'((v < 0) ? -v : v);
    return d;
  endfunction

  always_comb begin
    logic [WP-1:0] acc;
    acc = '0;
    for (int k = 0; k < ND; k++) begin
      dig[k] = recode8(bx[3*k +: 4]);
      pp[k]  = dig[k].neg ? (~mult[dig[k].mag] + WP'(1)) : mult[dig[k].mag];
      acc    = acc + (pp[k] << (3*k));
    end
    p = acc;
  end
endmodule
