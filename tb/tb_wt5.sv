// tb_wt5: exhaustive self-checking test of the five-input Wallace tree.
//
// Both versions (conventional and multiplexer full adders) get all 32 input
// patterns; each output must equal the number of ones in the input.
module tb_wt5;
  import wtm_pkg::*;

  logic [4:0] a;
  logic [2:0] s_csa, s_mux;
  int unsigned checks = 0;
  int unsigned failures = 0;

  wt5 #(.FA_STYLE(FA_CSA)) dut_csa (.a(a), .s(s_csa));
  wt5 #(.FA_STYLE(FA_MUX)) dut_mux (.a(a), .s(s_mux));

  initial begin
    for (int v = 0; v < 32; v++) begin
      int unsigned ones;
      a = 5'(v);
      #1;
      ones = 0;
      for (int k = 0; k < 5; k++) ones += (v >> k) & 1;
      checks += 2;
      if (s_csa != 3'(ones)) begin
        failures++;
        $display("FAIL csa a=%b: %0d, expected %0d", a, s_csa, ones);
      end
      if (s_mux != 3'(ones)) begin
        failures++;
        $display("FAIL mux a=%b: %0d, expected %0d", a, s_mux, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
