// Self-checking testbench for ara2, the 2-bit approximate recoding adder.
// All 16 input combinations. The reference is arithmetic, not logic: the slice
// value 4*a_i + 2*a_{i+1} + round(cin + a_{i-1} - a_i), where round() clamps
// the bracket to 0..1. The testbench also checks that the error against the
// exact slice sum 2a_{i+1} + 3a_i + a_{i-1} + cin is +1 only for
// {cin,a_{i-1},a_i} = {0,0,1} and -1 only for {1,1,0}, and that this happens
// in exactly 4 of the 16 combinations.
module tb_ara2;
  logic [2:0] a;
  logic       cin, cout;
  logic [1:0] s;
  int         checks = 0, failures = 0, nerr = 0;

  ara2 dut (.a(a), .cin(cin), .s(s), .cout(cout));

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
    for (int v = 0; v < 16; v++) begin
      int ap1, ai, am1, ci, exact, approx, ref_approx, e, ref_e;
      {cin, a} = 4'(v);
      #1;
      ap1 = int'(a[2]); ai = int'(a[1]); am1 = int'(a[0]); ci = int'(cin);
      exact      = 2*ap1 + 3*ai + am1 + ci;
      approx     = 4*int'(cout) + 2*int'(s[1]) + int'(s[0]);
      ref_approx = 4*ai + 2*ap1 + clamp01(ci + am1 - ai);
      e          = approx - exact;
      ref_e      = (ci == 0 && am1 == 0 && ai == 1) ?  1 :
                   (ci == 1 && am1 == 1 && ai == 0) ? -1 : 0;
      if (e != 0) nerr++;
      checks++;
      if (approx != ref_approx || e != ref_e) begin
        failures++;
        $display("FAIL a=%b cin=%b: got %0d expected %0d (error %0d, expected %0d)",
                 a, cin, approx, ref_approx, e, ref_e);
      end
    end
    checks++;
    if (nerr != 4) begin
      failures++;
      $display("FAIL %0d erroneous combinations, expected 4", nerr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
