// Self-checking testbench for ml_rca at M = 8: every pair of 8-bit addends with
// both carry-in values (131072 sums) is compared with integer addition.
module tb_ml_rca;
  localparam int M = 8;
  logic [M-1:0] x, y, s;
  logic         cin, cout;
  int           checks = 0, failures = 0;

  ml_rca #(.M(M)) dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2*M+1)); v++) begin
      {cin, x, y} = (2*M+1)'(v);
      #1;
      checks++;
      if ({cout, s} != (M+1)'(int'(x) + int'(y) + int'(cin))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d + %0d + %0d = %0d", x, y, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
