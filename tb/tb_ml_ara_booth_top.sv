// End-to-end testbench for ml_ara_booth_top at its default parameters (N = 16,
// P3 = 5, P5 = 3, P7 = 2): the radix-8 and the radix-16 multiplier are driven
// with independent operands, corner values first and then random ones.
// Each product and each odd multiple is compared with the arithmetic reference
// model. The testbench counts how often each mechanism of the design acts:
//   - every radix-8 digit -4..4 and radix-16 digit -8..8 is selected,
//   - an ARA rounding error reaches 3A, 5A and 7A (and 6A = 2*3A is used),
//   - a product comes out inexact, and a product that uses no odd multiple
//     comes out exact,
// and counts a failure for any mechanism that never occurred. Error metrics of
// the products (mean relative error distance, normalised mean error distance)
// are printed for information.
module tb_ml_ara_booth_top;
  import tb_ara_ref_pkg::*;
  localparam int N = 16, P3 = 5, P5 = 3, P7 = 2, NRAND = 50000;

  logic [N-1:0]   r8_a, r8_b, r16_a, r16_b;
  logic [2*N-1:0] r8_p, r16_p;
  logic [N+1:0]   r8_a3, r16_a3;
  logic [N+2:0]   r16_a5, r16_a7;

  int checks = 0, failures = 0;
  int r8_digit_seen  [-4:4];
  int r16_digit_seen [-8:8];
  int n_err3 = 0, n_err5 = 0, n_err7 = 0, n_use6 = 0;
  int n_r8_inexact = 0, n_r16_inexact = 0, n_r8_exact_plain = 0, n_r16_exact_plain = 0;
  real r8_sum_abs = 0.0, r16_sum_abs = 0.0;

  ml_ara_booth_top dut (
    .r8_a(r8_a), .r8_b(r8_b), .r8_p(r8_p), .r8_a3(r8_a3),
    .r16_a(r16_a), .r16_b(r16_b), .r16_p(r16_p),
    .r16_a3(r16_a3), .r16_a5(r16_a5), .r16_a7(r16_a7)
  );

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sx(logic [2*N-1:0] v);
    return longint'(signed'(v));
  endfunction

  task automatic check(string what, longint got, longint expect_v);
    checks++;
    if (got != expect_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, expect_v);
    end
  endtask

  task automatic apply(logic [N-1:0] a8, logic [N-1:0] b8, logic [N-1:0] a16, logic [N-1:0] b16);
    longint sa8, sb8, sa16, sb16, p8, p16;
    bit odd8, odd16;
    r8_a = a8; r8_b = b8; r16_a = a16; r16_b = b16;
    #1;
    sa8  = longint'(signed'(a8));  sb8  = longint'(signed'(b8));
    sa16 = longint'(signed'(a16)); sb16 = longint'(signed'(b16));

    // radix-8 side
    odd8 = 1'b0;
    for (int k = 0; k < (N + 2) / 3; k++) begin
      int d = booth_digit(sb8, 3, k);
      r8_digit_seen[d]++;
      if (d == 3 || d == -3) odd8 = 1'b1;
    end
    p8 = sx(r8_p);
    check("radix-8 product", p8, sx((2*N)'(ref_product(sa8, sb8, N, 3, P3, 0, 0))));
    check("radix-8 3A", longint'(signed'(r8_a3)), ref_3a(sa8, P3));
    if (p8 != sa8 * sb8) n_r8_inexact++;
    if (!odd8) begin
      check("radix-8 product without 3A", p8, sa8 * sb8);
      n_r8_exact_plain++;
    end
    r8_sum_abs += (p8 > sa8 * sb8) ? real'(p8 - sa8 * sb8) : real'(sa8 * sb8 - p8);

    // radix-16 side
    odd16 = 1'b0;
    for (int k = 0; k < (N + 3) / 4; k++) begin
      int d = booth_digit(sb16, 4, k);
      int m = (d < 0) ? -d : d;
      r16_digit_seen[d]++;
      if (m == 3 || m == 5 || m == 6 || m == 7) odd16 = 1'b1;
      if (m == 6 && ref_3a(sa16, P3) != 3 * sa16) n_use6++;
    end
    p16 = sx(r16_p);
    check("radix-16 product", p16, sx((2*N)'(ref_product(sa16, sb16, N, 4, P3, P5, P7))));
    check("radix-16 3A", longint'(signed'(r16_a3)), ref_3a(sa16, P3));
    check("radix-16 5A", longint'(signed'(r16_a5)), ref_5a(sa16, P5));
    check("radix-16 7A", longint'(signed'(r16_a7)), ref_7a(sa16, P7));
    if (longint'(signed'(r16_a3)) != 3 * sa16) n_err3++;
    if (longint'(signed'(r16_a5)) != 5 * sa16) n_err5++;
    if (longint'(signed'(r16_a7)) != 7 * sa16) n_err7++;
    if (p16 != sa16 * sb16) n_r16_inexact++;
    if (!odd16) begin
      check("radix-16 product without odd multiples", p16, sa16 * sb16);
      n_r16_exact_plain++;
    end
    r16_sum_abs += (p16 > sa16 * sb16) ? real'(p16 - sa16 * sb16) : real'(sa16 * sb16 - p16);
  endtask

  task automatic need(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never occurred: %s", what);
    end
  endtask

  initial begin
    static logic [N-1:0] corners [5] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h7FFF};
    int total;
    foreach (r8_digit_seen[d])  r8_digit_seen[d] = 0;
    foreach (r16_digit_seen[d]) r16_digit_seen[d] = 0;
    foreach (corners[i]) foreach (corners[j]) apply(corners[i], corners[j], corners[j], corners[i]);
    for (int t = 0; t < NRAND; t++) apply(N'($urandom), N'($urandom), N'($urandom), N'($urandom));
    total = NRAND + 25;

    for (int d = -4; d <= 4; d++) need($sformatf("radix-8 digit %0d", d), r8_digit_seen[d]);
    for (int d = -8; d <= 8; d++) need($sformatf("radix-16 digit %0d", d), r16_digit_seen[d]);
    need("ARA error in 3A", n_err3);
    need("ARA error in 5A", n_err5);
    need("ARA error in 7A", n_err7);
    need("approximate 6A = 2*3A selected", n_use6);
    need("inexact radix-8 product", n_r8_inexact);
    need("inexact radix-16 product", n_r16_inexact);
    need("exact radix-8 product (no 3A digit)", n_r8_exact_plain);
    need("exact radix-16 product (no odd digit)", n_r16_exact_plain);

    $display("operand pairs per multiplier: %0d", total);
    $display("3A/5A/7A inexact for %0d/%0d/%0d multiplicands", n_err3, n_err5, n_err7);
    $display("radix-8 : %0d inexact products, NMED = %e", n_r8_inexact,
             r8_sum_abs / real'(total) / (2.0 ** (2*N - 2)));
    $display("radix-16: %0d inexact products, NMED = %e", n_r16_inexact,
             r16_sum_abs / real'(total) / (2.0 ** (2*N - 2)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
