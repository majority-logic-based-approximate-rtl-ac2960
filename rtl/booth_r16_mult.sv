// Signed N x N radix-16 Booth multiplier whose odd multiples 3A, 5A and 7A come
// from the majority-logic approximate recoding adder generators.
//
// Operation: B is recoded into ceil(N/4) digits d_k = -8b_{4k+3} + 4b_{4k+2} +
// 2b_{4k+1} + b_{4k} + b_{4k-1}, each in -8..8 (b_{-1} = 0, B sign-extended).
// Each digit selects one multiple of A. 0, A, 2A, 4A and 8A are shifts. 3A
// comes from odd3_gen, 5A from odd5_gen and 7A from odd7_gen, and 6A is the
// approximate 3A shifted left by one. The selected multiple is negated for a
// negative digit, and the partial products are summed at weights 16^k into a
// 2N-bit two's-complement product.
// The recoding, the generators and 6A = 2*3A follow the published design. Two
// choices are this design's own. First, 3A uses P3 two-bit ARAs, the radix-8
// setting. Second, the partial products are negated exactly and summed with a
// plain sum. Purely combinational.
module booth_r16_mult
  import ml_ara_pkg::*;
#(
  parameter int unsigned N  = N_DEFAULT,
  parameter int unsigned P3 = P3_DEFAULT,
  parameter int unsigned P5 = P5_DEFAULT,
  parameter int unsigned P7 = P7_DEFAULT
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p,
  output logic [N+1:0]   a3,
  output logic [N+2:0]   a5,
  output logic [N+2:0]   a7
);
  localparam int unsigned ND = booth_digits(N, 4);
  localparam int unsigned WB = 4*ND + 1;
  localparam int unsigned WP = 2*N;

  odd3_gen #(.N(N), .P(P3)) u_odd3 (.a(a), .a3(a3));
  odd5_gen #(.N(N), .P(P5)) u_odd5 (.a(a), .a5(a5));
  odd7_gen #(.N(N), .P(P7)) u_odd7 (.a(a), .a7(a7));

  logic [WB-1:0] bx;
  r16_digit_t    dig [ND];
  logic [WP-1:0] mult [9];      // 0A .. 8A
  logic [WP-1:0] pp   [ND];

  assign bx = {{(WB-N-1){b[N-1]}}, b, 1'b0};

  assign mult[0] = '0;
  assign mult[1] = WP'(signed'(a));
  assign mult[2] = WP'(signed'(a)) << 1;
  assign mult[3] = WP'(signed'(a3));
  assign mult[4] = WP'(signed'(a)) << 2;
  assign mult[5] = WP'(signed'(a5));
  assign mult[6] = WP'(signed'(a3)) << 1;
  assign mult[7] = WP'(signed'(a7));
  assign mult[8] = WP'(signed'(a)) << 3;

  // Booth recoding of five adjacent multiplier bits into sign and magnitude
  function automatic r16_digit_t recode16(logic [4:0] g);
    int v;
    r16_digit_t d;
    v = -8*int'(g[4]) + 4*int'(g[3]) + 2*int'(g[2]) + int'(g[1]) + int'(g[0]);
    d.neg = (v < 0);
    d.mag = 4'((v < 0) ? -v : v);
    return d;
  endfunction

  always_comb begin
    logic [WP-1:0] acc;
    acc = '0;
    for (int k = 0; k < ND; k++) begin
      dig[k] = recode16(bx[4*k +: 5]);
      pp[k]  = dig[k].neg ? (~mult[dig[k].mag] + WP'(1)) : mult[dig[k].mag];
      acc    = acc + (pp[k] << (4*k));
    end
    p = acc;
  end
endmodule
