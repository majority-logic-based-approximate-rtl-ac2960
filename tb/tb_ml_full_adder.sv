// Self-checking testbench for ml_full_adder: all eight input combinations are
// compared with the integer sum a + b + cin.
module tb_ml_full_adder;
  logic a, b, cin, s, cout;
  int   checks = 0, failures = 0;

  ml_full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if (2*int'(cout) + int'(s) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        $display("FAIL fa(%b,%b,%b) -> cout=%b s=%b", a, b, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
