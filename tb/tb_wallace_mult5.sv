// tb_wallace_mult5: exhaustive self-checking test of the 5x5 multiplier.
//
// Both versions (conventional and multiplexer full adders) are driven with
// the three operand pairs of the reference waveform first (31*31 = 961,
// 8*8 = 64, 11*8 = 88) and then with all 1024 operand pairs. For each, the
// 12-bit raw result must equal x * y (so its two top bits are zero) and the
// 10-bit product must equal x * y.
module tb_wallace_mult5;
  import wtm_pkg::*;

  logic [OPW-1:0]    x, y;
  logic [RAW_W-1:0]  sum_w_csa, sum_w_mux;
  logic [PROD_W-1:0] prod_csa, prod_mux;
  int unsigned checks = 0;
  int unsigned failures = 0;

  wallace_mult5 #(.FA_STYLE(FA_CSA)) dut_csa (.x(x), .y(y), .sum_w(sum_w_csa), .product(prod_csa));
  wallace_mult5 #(.FA_STYLE(FA_MUX)) dut_mux (.x(x), .y(y), .sum_w(sum_w_mux), .product(prod_mux));

  task automatic apply(input int vx, input int vy, input int expected);
    x = OPW'(vx);
    y = OPW'(vy);
    #10;
    checks += 4;
    if (sum_w_csa != RAW_W'(expected)) begin
      failures++;
      $display("FAIL csa %0d*%0d: sum_w=%0d, expected %0d", vx, vy, sum_w_csa, expected);
    end
    if (prod_csa != PROD_W'(expected)) begin
      failures++;
      $display("FAIL csa %0d*%0d: product=%0d, expected %0d", vx, vy, prod_csa, expected);
    end
    if (sum_w_mux != RAW_W'(expected)) begin
      failures++;
      $display("FAIL mux %0d*%0d: sum_w=%0d, expected %0d", vx, vy, sum_w_mux, expected);
    end
    if (prod_mux != PROD_W'(expected)) begin
      failures++;
      $display("FAIL mux %0d*%0d: product=%0d, expected %0d", vx, vy, prod_mux, expected);
    end
  endtask

  initial begin
    apply(31, 31, 961);
    apply(8, 8, 64);
    apply(11, 8, 88);
    for (int vx = 0; vx < 32; vx++) begin
      for (int vy = 0; vy < 32; vy++) begin
        apply(vx, vy, vx * vy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
