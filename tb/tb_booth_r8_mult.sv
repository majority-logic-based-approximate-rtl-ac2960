// Self-checking testbench for booth_r8_mult at N = 16, P3 = 5.
// It applies corner operands and then random operands. Each product is
// compared with the reference sum of d_k * M(d_k) * 8^k, where M(3) is the
// modelled approximate 3A and the other multiples are exact. The product is
// also checked to be exact whenever no digit is +-3, and the 3A output is
// checked too. Every digit value -4..4 must occur at least once.
module tb_booth_r8_mult;
  import tb_ara_ref_pkg::*;
  localparam int N = 16, P3 = 5, NRAND = 100000;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  logic [N+1:0]   a3;
  int checks = 0, failures = 0;
  int digit_seen [-4:4];

  booth_r8_mult #(.N(N), .P3(P3)) dut (.a(a), .b(b), .p(p), .a3(a3));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [N-1:0] av, logic [N-1:0] bv);
    longint sa, sb, expect_p, got_p;
    bit has3;
    a = av; b = bv;
    #1;
    sa = longint'(signed'(av));
    sb = longint'(signed'(bv));
    has3 = 1'b0;
    for (int k = 0; k < (N + 2) / 3; k++) begin
      int d = booth_digit(sb, 3, k);
      digit_seen[d]++;
      if (d == 3 || d == -3) has3 = 1'b1;
    end
    expect_p = ref_product(sa, sb, N, 3, P3, 0, 0);
    got_p    = longint'(signed'(p));
    checks++;
    if (got_p != longint'(signed'((2*N)'(expect_p)))) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d: got %0d expected %0d", sa, sb, got_p, expect_p);
    end
    checks++;
    if (longint'(signed'(a3)) != ref_3a(sa, P3)) begin
      failures++;
      if (failures < 10) $display("FAIL 3A of %0d: got %0d", sa, signed'(a3));
    end
    if (!has3) begin
      checks++;
      if (got_p != sa * sb) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d without 3A digits not exact: %0d", sa, sb, got_p);
      end
    end
  endtask

  initial begin
    static logic [N-1:0] corners [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h7FFF, 16'h5555};
    foreach (digit_seen[d]) digit_seen[d] = 0;
    foreach (corners[i]) foreach (corners[j]) apply(corners[i], corners[j]);
    for (int t = 0; t < NRAND; t++) apply(N'($urandom), N'($urandom));
    for (int d = -4; d <= 4; d++) begin
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
