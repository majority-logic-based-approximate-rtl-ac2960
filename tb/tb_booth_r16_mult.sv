// Self-checking testbench for booth_r16_mult at N = 16, P3 = 5, P5 = 3, P7 = 2.
// It applies corner operands and then random operands. Each product is
// compared with the reference sum of d_k * M(d_k) * 16^k. M(3), M(5) and M(7)
// are the modelled approximate odd multiples, M(6) = 2*M(3), and the rest are
// exact. The product must be exact when no digit is odd above 1 or +-6. The
// 3A, 5A and 7A outputs are checked, and every digit value -8..8 must occur.
module tb_booth_r16_mult;
  import tb_ara_ref_pkg::*;
  localparam int N = 16, P3 = 5, P5 = 3, P7 = 2, NRAND = 100000;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  logic [N+1:0]   a3;
  logic [N+2:0]   a5, a7;
  int checks = 0, failures = 0;
  int digit_seen [-8:8];

  booth_r16_mult #(.N(N), .P3(P3), .P5(P5), .P7(P7)) dut (
    .a(a), .b(b), .p(p), .a3(a3), .a5(a5), .a7(a7)
  );

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [N-1:0] av, logic [N-1:0] bv);
    longint sa, sb, expect_p, got_p;
    bit approx_digit;
    a = av; b = bv;
    #1;
    sa = longint'(signed'(av));
    sb = longint'(signed'(bv));
    approx_digit = 1'b0;
    for (int k = 0; k < (N + 3) / 4; k++) begin
      int d = booth_digit(sb, 4, k);
      int m = (d < 0) ? -d : d;
      digit_seen[d]++;
      if (m == 3 || m == 5 || m == 6 || m == 7) approx_digit = 1'b1;
    end
    expect_p = ref_product(sa, sb, N, 4, P3, P5, P7);
    got_p    = longint'(signed'(p));
    checks++;
    if (got_p != longint'(signed'((2*N)'(expect_p)))) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d: got %0d expected %0d", sa, sb, got_p, expect_p);
    end
    checks += 3;
    if (longint'(signed'(a3)) != ref_3a(sa, P3) || longint'(signed'(a5)) != ref_5a(sa, P5) ||
        longint'(signed'(a7)) != ref_7a(sa, P7)) begin
      failures++;
      if (failures < 10) $display("FAIL odd multiples of %0d: %0d %0d %0d", sa,
                                  signed'(a3), signed'(a5), signed'(a7));
    end
    if (!approx_digit) begin
      checks++;
      if (got_p != sa * sb) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d without odd digits not exact: %0d", sa, sb, got_p);
      end
    end
  endtask

  initial begin
    static logic [N-1:0] corners [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h7FFF, 16'h5555};
    foreach (digit_seen[d]) digit_seen[d] = 0;
    foreach (corners[i]) foreach (corners[j]) apply(corners[i], corners[j]);
    for (int t = 0; t < NRAND; t++) apply(N'($urandom), N'($urandom));
    for (int d = -8; d <= 8; d++) begin
      checks++;
      if (digit_seen[d] == 0) begin
        failures++;
        $display("FAIL Booth digit %0d never occurred", d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
