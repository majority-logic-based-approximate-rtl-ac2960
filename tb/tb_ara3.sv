// Self-checking testbench for ara3, the 3-bit approximate recoding adder.
// All 64 input combinations. The reference is
// 8a_i + 4a_{i+2} + 2*round(a_{i+1}+a_{i-1}-a_i) + round(a_{i-2}+cin-a_i), where
// round() clamps to 0..1. The error against the exact slice sum
// 4a_{i+2} + 2a_{i+1} + 2a_{i-1} + 5a_i + a_{i-2} + cin is tallied by value.
// Expected: 28 erroneous combinations, of which 2 at +3, 2 at -3, 6 at +2,
// 6 at -2, 6 at +1 and 6 at -1.
module tb_ara3;
  logic [4:0] a;
  logic       cin, cout;
  logic [2:0] s;
  int         checks = 0, failures = 0, nerr = 0;
  int         hist [-3:3];

  ara3 dut (.a(a), .cin(cin), .s(s), .cout(cout));

  function automatic int clamp01(int v);
    return (v < 0) ? 0 : (v > 1) ? 1 : v;
  endfunction

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int exp_hist [-3:3] = '{2, 6, 6, 36, 6, 6, 2};
    foreach (hist[i]) hist[i] = 0;
    for (int v = 0; v < 64; v++) begin
      int ap2, ap1, ai, am1, am2, ci, exact, approx, ref_approx, e;
      {cin, a} = 6'(v);
      #1;
      ap2 = int'(a[4]); ap1 = int'(a[3]); ai = int'(a[2]); am1 = int'(a[1]); am2 = int'(a[0]);
      ci  = int'(cin);
      exact      = 4*ap2 + 2*ap1 + 2*am1 + 5*ai + am2 + ci;
      approx     = 8*int'(cout) + 4*int'(s[2]) + 2*int'(s[1]) + int'(s[0]);
      ref_approx = 8*ai + 4*ap2 + 2*clamp01(ap1 + am1 - ai) + clamp01(am2 + ci - ai);
      e          = approx - exact;
      if (e != 0) nerr++;
      if (e >= -3 && e <= 3) hist[e]++;
      checks++;
      if (approx != ref_approx) begin
        failures++;
        $display("FAIL a=%b cin=%b: got %0d expected %0d", a, cin, approx, ref_approx);
      end
    end
    checks++;
    if (nerr != 28) begin
      failures++;
      $display("FAIL %0d erroneous combinations, expected 28", nerr);
    end
    for (int i = -3; i <= 3; i++) begin
      checks++;
      if (hist[i] != exp_hist[i]) begin
        failures++;
        $display("FAIL error %0d occurs %0d times, expected %0d", i, hist[i], exp_hist[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
