// Self-checking testbench for odd5_gen at N = 16, P = 3 (the preferred setting),
// plus an exact instance with P = 0.
// All 65536 multiplicands are applied. The reference is 5A plus, for each 3-bit
// ARA at i = 3k+2, 2^{i+1}*(round(y) - y) + 2^i*(round(x) - x) with
// y = a_{i+1} + a_{i-1} - a_i and x = a_{i-2} + cin_k - a_i, cin_0 = 0 and
// cin_k = a_{i-3}; round() clamps to 0..1.
// The error metrics over all inputs are checked against the published figures
// NMED = 6.34e-4 (normalised by 5*2^N) and RMSE = 314.36.
module tb_odd5_gen;
  localparam int N = 16, P = 3, W = N + 3;
  logic [N-1:0] a;
  logic [W-1:0] a5, a5_exact;
  int  checks = 0, failures = 0;
  real sum_abs = 0.0, sum_sq = 0.0, nmed, rmse;

  odd5_gen #(.N(N), .P(P)) dut   (.a(a), .a5(a5));
  odd5_gen #(.N(N), .P(0)) dut_x (.a(a), .a5(a5_exact));

  function automatic int clamp01(int v);
    return (v < 0) ? 0 : (v > 1) ? 1 : v;
  endfunction

  function automatic longint ref5(logic [N-1:0] av);
    logic [W-1:0] ax;
    longint r;
    ax = W'(signed'(av));
    r  = 5 * longint'(signed'(av));
    for (int k = 0; k < P; k++) begin
      int i, ci, x, y;
      i  = 3*k + 2;
      ci = (k == 0) ? 0 : int'(ax[i-3]);
      y  = int'(ax[i+1]) + int'(ax[i-1]) - int'(ax[i]);
      x  = int'(ax[i-2]) + ci - int'(ax[i]);
      r += (longint'(clamp01(y) - y) <<< (i+1)) + (longint'(clamp01(x) - x) <<< i);
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
      exact    = 5 * longint'(signed'(a));
      approx   = longint'(signed'(a5));
      expect_v = ref5(a);
      sum_abs += (approx > exact) ? real'(approx - exact) : real'(exact - approx);
      sum_sq  += real'(approx - exact) * real'(approx - exact);
      checks++;
      if (approx != expect_v) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d: 5A~=%0d expected %0d", signed'(a), approx, expect_v);
      end
      checks++;
      if (longint'(signed'(a5_exact)) != exact) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d: exact 5A=%0d", signed'(a), signed'(a5_exact));
      end
    end
    nmed = sum_abs / real'(1 << N) / (5.0 * real'(1 << N));
    rmse = $sqrt(sum_sq / real'(1 << N));
    $display("5A with P=%0d three-bit ARAs: NMED=%e RMSE=%f", P, nmed, rmse);
    checks++;
    if (nmed < 6.33e-4 || nmed > 6.35e-4) begin
      failures++;
      $display("FAIL NMED %e differs from 6.34e-4", nmed);
    end
    checks++;
    if (rmse < 314.35 || rmse > 314.38) begin
      failures++;
      $display("FAIL RMSE %f differs from 314.36", rmse);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
