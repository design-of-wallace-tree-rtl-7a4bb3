// tb_fa_mux: exhaustive self-checking test of the fa_mux full adder.
//
// All eight input combinations are applied; sum and carry are compared with
// the two bits of the integer a + b + c. A watchdog ends the run with a
// failure if it has not finished in time.
module tb_fa_mux;

  logic a, b, c, sum, cout;
  int unsigned checks = 0;
  int unsigned failures = 0;

  fa_mux dut (.a(a), .b(b), .c(c), .sum(sum), .cout(cout));

  initial begin
    for (int v = 0; v < 8; v++) begin
      int unsigned expect_total;
      {a, b, c} = 3'(v);
      #1;
      expect_total = int'(a) + int'(b) + int'(c);
      checks++;
      if ({cout, sum} != 2'(expect_total)) begin
        failures++;
        $display("FAIL a=%0d b=%0d c=%0d: cout=%0d sum=%0d, expected %0d",
                 a, b, c, cout, sum, expect_total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
