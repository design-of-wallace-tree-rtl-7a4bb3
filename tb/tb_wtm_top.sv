// tb_wtm_top: end-to-end test of both multiplier versions at full size.
//
// Every one of the 1024 unsigned operand pairs is multiplied by both
// versions; raw results and products are compared with x * y, and the two
// versions with each other. The test also counts how often the mechanisms of
// the tree are exercised and fails if one never is:
//   - a column Wallace tree compressing five ones (count 5, all three
//     output bits in use),
//   - a stage-3 carry rippling through four or more adders in a row,
//   - a stage-3 carry reaching column 9, the top product bit (column 10 and
//     above stay zero: the largest product, 961, is below 2^10),
//   - the multiplexer full adder taking its select = 1 path,
//   - the reference waveform's operand pairs (31*31, 8*8, 11*8).
module tb_wtm_top;
  import wtm_pkg::*;

  logic [OPW-1:0]    x, y;
  logic [RAW_W-1:0]  sum_w_csa, sum_w_mux;
  logic [PROD_W-1:0] product_csa, product_mux;
  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned n_full_column = 0;
  int unsigned n_long_ripple = 0;
  int unsigned n_col9_carry = 0;
  int unsigned n_mux_sel1 = 0;
  int unsigned n_reference = 0;

  wtm_top dut (
    .x(x), .y(y),
    .sum_w_csa(sum_w_csa), .product_csa(product_csa),
    .sum_w_mux(sum_w_mux), .product_mux(product_mux)
  );

  initial begin
    for (int vx = 0; vx < 32; vx++) begin
      for (int vy = 0; vy < 32; vy++) begin
        int run, longest;
        x = OPW'(vx);
        y = OPW'(vy);
        #10;
        checks += 5;
        if (sum_w_csa != RAW_W'(vx * vy) || product_csa != PROD_W'(vx * vy)) begin
          failures++;
          $display("FAIL csa %0d*%0d: sum_w=%0d product=%0d", vx, vy, sum_w_csa, product_csa);
        end
        if (sum_w_mux != RAW_W'(vx * vy) || product_mux != PROD_W'(vx * vy)) begin
          failures++;
          $display("FAIL mux %0d*%0d: sum_w=%0d product=%0d", vx, vy, sum_w_mux, product_mux);
        end
        if (sum_w_csa != sum_w_mux) begin
          failures++;
          $display("FAIL %0d*%0d: versions differ", vx, vy);
        end
        if (sum_w_csa[RAW_W-1:PROD_W] != '0) begin
          failures++;
          $display("FAIL %0d*%0d: dropped top bits not zero", vx, vy);
        end
        if ((vx == 31 && vy == 31) || (vx == 8 && vy == 8) || (vx == 11 && vy == 8)) begin
          n_reference++;
          if (sum_w_csa != RAW_W'(vx * vy)) failures++;
        end else begin
          checks--;
        end
        // Mechanism coverage, observed inside the version with conventional cells.
        if (dut.u_csa.w[4] == 3'd5) n_full_column++;
        run = 0;
        longest = 0;
        for (int k = 0; k < NCOL; k++) begin
          run = dut.u_csa.s3_c[k] ? run + 1 : 0;
          if (run > longest) longest = run;
        end
        if (longest >= 4) n_long_ripple++;
        if (dut.u_csa.s3_c[NCOL-3]) n_col9_carry++;
        if (dut.u_mux.g_st3[0].u_fa.g_mux.u_fa.sel) n_mux_sel1++;
      end
    end
    $display("coverage: full columns=%0d long ripples=%0d carries into column 9=%0d mux select=1=%0d reference pairs=%0d",
             n_full_column, n_long_ripple, n_col9_carry, n_mux_sel1, n_reference);
    checks += 5;
    if (n_full_column == 0) begin failures++; $display("FAIL no column of five ones"); end
    if (n_long_ripple == 0) begin failures++; $display("FAIL no long stage-3 ripple"); end
    if (n_col9_carry == 0) begin failures++; $display("FAIL no carry into column 9"); end
    if (n_mux_sel1 == 0) begin failures++; $display("FAIL mux select never 1"); end
    if (n_reference != 3) begin failures++; $display("FAIL reference pairs not all seen"); end
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
