// Self-checking testbench for odd3_gen at N = 16, P = 5 (the preferred setting),
// plus an exact instance with P = 0.
// Every one of the 65536 multiplicands is applied. The reference is the exact
// 3A plus the rounding error of each 2-bit ARA, 2^i*(round(x_k) - x_k) with
// x_k = cin_k + a_{i-1} - a_i, i = 2k+1, cin_0 = 0 and cin_k = a_{i-2}. round()
// clamps to 0..1. The P = 0 instance must equal 3A exactly.
// Over all inputs the testbench also computes the error metrics: mean error
// distance normalised by 3*2^N (NMED) and root-mean-square error (RMSE). It
// checks them against the published figures NMED = 7.51e-4 and RMSE = 247.31.
module tb_odd3_gen;
  localparam int N = 16, P = 5, W = N + 2;
  logic [N-1:0] a;
  logic [W-1:0] a3, a3_exact;
  int  checks = 0, failures = 0;
  real sum_abs = 0.0, sum_sq = 0.0, nmed, rmse;

  odd3_gen #(.N(N), .P(P)) dut   (.a(a), .a3(a3));
  odd3_gen #(.N(N), .P(0)) dut_x (.a(a), .a3(a3_exact));

  function automatic int clamp01(int v);
    return (v < 0) ? 0 : (v > 1) ? 1 : v;
  endfunction

  function automatic longint ref3(logic [N-1:0] av);
    logic [W-1:0] ax;
    longint r;
    ax = W'(signed'(av));
    r  = 3 * longint'(signed'(av));
    for (int k = 0; k < P; k++) begin
      int i, ci, x;
      i  = 2*k + 1;
      ci = (k == 0) ? 0 : int'(ax[i-2]);
      x  = ci + int'(ax[i-1]) - int'(ax[i]);
      r += longint'(clamp01(x) - x) <<< i;
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
      exact    = 3 * longint'(signed'(a));
      approx   = longint'(signed'(a3));
      expect_v = ref3(a);
      sum_abs += (approx > exact) ? real'(approx - exact) : real'(exact - approx);
      sum_sq  += real'(approx - exact) * real'(approx - exact);
      checks++;
      if (approx != expect_v) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d: 3A~=%0d expected %0d", signed'(a), approx, expect_v);
      end
      checks++;
      if (longint'(signed'(a3_exact)) != exact) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d: exact 3A=%0d", signed'(a), signed'(a3_exact));
      end
    end
    nmed = sum_abs / real'(1 << N) / (3.0 * real'(1 << N));
    rmse = $sqrt(sum_sq / real'(1 << N));
    $display("3A with P=%0d two-bit ARAs: NMED=%e RMSE=%f", P, nmed, rmse);
    checks++;
    if (nmed < 7.50e-4 || nmed > 7.52e-4) begin
      failures++;
      $display("FAIL NMED %e differs from 7.51e-4", nmed);
    end
    checks++;
    if (rmse < 247.30 || rmse > 247.33) begin
      failures++;
      $display("FAIL RMSE %f differs from 247.31", rmse);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
