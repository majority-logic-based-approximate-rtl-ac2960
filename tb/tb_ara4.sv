// Self-checking testbench for ara4, the 4-bit approximate recoding adder.
// All 256 input combinations. The reference is the rounded regrouping
// 16a_i + 8*round(~a_{i+3}+a_{i-1}-a_i) + 4*round(~a_{i+2}+a_{i-2}-a_{i-1})
//       + 2*round(~a_{i+1}+a_{i-3}-a_{i-2}) + round(cin+~a_i-a_{i-3}),
// with round() clamping to 0..1. The testbench also counts the combinations
// whose result differs from the exact slice sum of 8A + ~A + cin, which should
// be 176.
module tb_ara4;
  logic [6:0] a;
  logic       cin, cout;
  logic [3:0] s;
  int         checks = 0, failures = 0, nerr = 0;

  ara4 dut (.a(a), .cin(cin), .s(s), .cout(cout));

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
    for (int v = 0; v < 256; v++) begin
      int p3, p2, p1, ai, m1, m2, m3, ci, exact, approx, ref_approx;
      {cin, a} = 8'(v);
      #1;
      p3 = int'(a[6]); p2 = int'(a[5]); p1 = int'(a[4]); ai = int'(a[3]);
      m1 = int'(a[2]); m2 = int'(a[1]); m3 = int'(a[0]); ci = int'(cin);
      exact  = 8*(1-p3) + 8*ai + 4*(1-p2) + 4*m1 + 2*(1-p1) + 2*m2 + (1-ai) + m3 + ci;
      approx = 16*int'(cout) + 8*int'(s[3]) + 4*int'(s[2]) + 2*int'(s[1]) + int'(s[0]);
      ref_approx = 16*ai + 8*clamp01((1-p3) + m1 - ai) + 4*clamp01((1-p2) + m2 - m1)
                 + 2*clamp01((1-p1) + m3 - m2) + clamp01(ci + (1-ai) - m3);
      if (approx != exact) nerr++;
      checks++;
      if (approx != ref_approx) begin
        failures++;
        $display("FAIL a=%b cin=%b: got %0d expected %0d", a, cin, approx, ref_approx);
      end
    end
    checks++;
    if (nerr != 176) begin
      failures++;
      $display("FAIL %0d erroneous combinations, expected 176", nerr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
