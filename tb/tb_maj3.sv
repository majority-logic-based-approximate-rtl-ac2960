// Self-checking testbench for maj3: all eight input combinations are compared
// with a count of ones (majority = at least two ones).
module tb_maj3;
  logic a, b, c, y;
  int   checks = 0, failures = 0;

  maj3 dut (.a(a), .b(b), .c(c), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (y !== ((int'(a) + int'(b) + int'(c)) >= 2)) begin
        failures++;
        $display("FAIL maj3(%b,%b,%b)=%b", a, b, c, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
