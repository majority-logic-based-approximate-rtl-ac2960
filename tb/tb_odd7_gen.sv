// Self-checking testbench for odd7_gen at N = 16, P = 2 (the preferred setting),
// plus an exact instance with P = 0.
// All 65536 multiplicands are applied. The reference is 7A plus, for each 4-bit
// ARA at i = 4k+3, the rounding errors of its four brackets,
//   sum_j 2^{i+j} * (round(x_j) - x_j), with
//   x_3 = ~a_{i+3} + a_{i-1} - a_i,   x_2 = ~a_{i+2} + a_{i-2} - a_{i-1},
//   x_1 = ~a_{i+1} + a_{i-3} - a_{i-2}, x_0 = cin_k + ~a_i - a_{i-3},
// where round() clamps to 0..1. cin_0 is the exact carry out of the three low
// bits of ~A + 1, which is 1 when a_2..a_0 are all zero, and cin_k = a_{i-4}.
// The RMSE over all inputs is checked against the published 522.61, within
// 0.1 %. The NMED is printed but not checked; see the design notes.
module tb_odd7_gen;
  localparam int N = 16, P = 2, W = N + 3;
  logic [N-1:0] a;
  logic [W-1:0] a7, a7_exact;
  int  checks = 0, failures = 0;
  real sum_abs = 0.0, sum_sq = 0.0, nmed, rmse;

  odd7_gen #(.N(N), .P(P)) dut   (.a(a), .a7(a7));
  odd7_gen #(.N(N), .P(0)) dut_x (.a(a), .a7(a7_exact));

  function automatic int clamp01(int v);
    return (v < 0) ? 0 : (v > 1) ? 1 : v;
  endfunction

  function automatic longint ref7(logic [N-1:0] av);
    logic [W-1:0] ax;
    longint r;
    int ci;
    ax = W'(signed'(av));
    r  = 7 * longint'(signed'(av));
    ci = (ax[2:0] == 3'b000) ? 1 : 0;
    for (int k = 0; k < P; k++) begin
      int i;
      int x [4];
      i = 4*k + 3;
      x[3] = (1 - int'(ax[i+3])) + int'(ax[i-1]) - int'(ax[i]);
      x[2] = (1 - int'(ax[i+2])) + int'(ax[i-2]) - int'(ax[i-1]);
      x[1] = (1 - int'(ax[i+1])) + int'(ax[i-3]) - int'(ax[i-2]);
      x[0] = ci + (1 - int'(ax[i])) - int'(ax[i-3]);
      for (int j = 0; j < 4; j++) r += longint'(clamp01(x[j]) - x[j]) <<< (i+j);
      ci = int'(ax[i]);
    end
    return r;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      longint exact, approx, expect_v;
      a = N'(v);
      #1;
      exact    = 7 * longint'(signed'(a));
      approx   = longint'(signed'(a7));
      expect_v = ref7(a);
      sum_abs += (approx > exact) ? real'(approx - exact) : real'(exact - approx);
      sum_sq  += real'(approx - exact) * real'(approx - exact);
      checks++;
      if (approx != expect_v) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d: 7A~=%0d expected %0d", signed'(a), approx, expect_v);
      end
      checks++;
      if (longint'(signed'(a7_exact)) != exact) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d: exact 7A=%0d", signed'(a), signed'(a7_exact));
      end
    end
    nmed = sum_abs / real'(1 << N) / (7.0 * real'(1 << N));
    rmse = $sqrt(sum_sq / real'(1 << N));
    $display("7A with P=%0d four-bit ARAs: NMED=%e RMSE=%f", P, nmed, rmse);
    checks++;
    if (rmse < 522.61 * 0.999 || rmse > 522.61 * 1.001) begin
      failures++;
      $display("FAIL RMSE %f differs from 522.61 by more than 0.1%%", rmse);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
