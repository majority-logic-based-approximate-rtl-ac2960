// Error sweep over the approximation factor p at N = 16: the number of ARA
// blocks in the 3A (p = 1..6), 5A (p = 1..4) and 7A (p = 1..3) generators.
// All 65536 multiplicands are applied to every generator instance. Each output
// is compared with the arithmetic reference model, and NMED and RMSE are
// printed per p, NMED normalised by m*2^N for the multiple m. The checks: the
// RMSE must grow with p, and the preferred points (p = 5, 3, 2) must reproduce
// the published RMSE values 247.31, 314.36 and 522.61 within 0.1 %.
module tb_ara_p_sweep;
  import tb_ara_ref_pkg::*;
  localparam int N = 16, W3 = N + 2, W5 = N + 3;
  localparam int NP3 = 6, NP5 = 4, NP7 = 3;

  logic [N-1:0]  a;
  logic [W3-1:0] a3 [1:NP3];
  logic [W5-1:0] a5 [1:NP5];
  logic [W5-1:0] a7 [1:NP7];
  int  checks = 0, failures = 0;
  real abs3 [1:NP3], sq3 [1:NP3];
  real abs5 [1:NP5], sq5 [1:NP5];
  real abs7 [1:NP7], sq7 [1:NP7];

  for (genvar p = 1; p <= NP3; p++) begin : g3
    odd3_gen #(.N(N), .P(p)) u (.a(a), .a3(a3[p]));
  end
  for (genvar p = 1; p <= NP5; p++) begin : g5
    odd5_gen #(.N(N), .P(p)) u (.a(a), .a5(a5[p]));
  end
  for (genvar p = 1; p <= NP7; p++) begin : g7
    odd7_gen #(.N(N), .P(p)) u (.a(a), .a7(a7[p]));
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compares one output with its reference; returns the error against the exact multiple
  function automatic real tally(longint got, longint expect_v, longint exact);
    checks++;
    if (got != expect_v) begin
      failures++;
      if (failures < 10) $display("FAIL got %0d expected %0d", got, expect_v);
    end
    return real'(got - exact);
  endfunction

  function automatic real rmse_of(real s_sq);
    return $sqrt(s_sq / real'(1 << N));
  endfunction

  task automatic expect_rmse(string what, real got, real paper);
    checks++;
    if (got < paper * 0.999 || got > paper * 1.001) begin
      failures++;
      $display("FAIL %s RMSE %f, published %f", what, got, paper);
    end
  endtask

  initial begin
    real prev;
    for (int p = 1; p <= NP3; p++) begin abs3[p] = 0.0; sq3[p] = 0.0; end
    for (int p = 1; p <= NP5; p++) begin abs5[p] = 0.0; sq5[p] = 0.0; end
    for (int p = 1; p <= NP7; p++) begin abs7[p] = 0.0; sq7[p] = 0.0; end
    for (int v = 0; v < (1 << N); v++) begin
      longint sa;
      real e;
      a = N'(v);
      #1;
      sa = longint'(signed'(a));
      for (int p = 1; p <= NP3; p++) begin e = tally(longint'(signed'(a3[p])), ref_3a(sa, p), 3*sa); abs3[p] += (e < 0.0) ? -e : e; sq3[p] += e * e; end
      for (int p = 1; p <= NP5; p++) begin e = tally(longint'(signed'(a5[p])), ref_5a(sa, p), 5*sa); abs5[p] += (e < 0.0) ? -e : e; sq5[p] += e * e; end
      for (int p = 1; p <= NP7; p++) begin e = tally(longint'(signed'(a7[p])), ref_7a(sa, p), 7*sa); abs7[p] += (e < 0.0) ? -e : e; sq7[p] += e * e; end
    end
    prev = 0.0;
    for (int p = 1; p <= NP3; p++) begin
      $display("3A p=%0d NMED=%e RMSE=%f", p, abs3[p] / 65536.0 / (3.0 * 65536.0), rmse_of(sq3[p]));
      checks++; if (rmse_of(sq3[p]) <= prev) failures++;
      prev = rmse_of(sq3[p]);
    end
    prev = 0.0;
    for (int p = 1; p <= NP5; p++) begin
      $display("5A p=%0d NMED=%e RMSE=%f", p, abs5[p] / 65536.0 / (5.0 * 65536.0), rmse_of(sq5[p]));
      checks++; if (rmse_of(sq5[p]) <= prev) failures++;
      prev = rmse_of(sq5[p]);
    end
    prev = 0.0;
    for (int p = 1; p <= NP7; p++) begin
      $display("7A p=%0d NMED=%e RMSE=%f", p, abs7[p] / 65536.0 / (7.0 * 65536.0), rmse_of(sq7[p]));
      checks++; if (rmse_of(sq7[p]) <= prev) failures++;
      prev = rmse_of(sq7[p]);
    end
    expect_rmse("3A p=5", rmse_of(sq3[5]), 247.31);
    expect_rmse("5A p=3", rmse_of(sq5[3]), 314.36);
    expect_rmse("7A p=2", rmse_of(sq7[2]), 522.61);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
