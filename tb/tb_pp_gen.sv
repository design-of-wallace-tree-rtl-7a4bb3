// tb_pp_gen: exhaustive self-checking test of the partial product columns.
//
// For all 1024 operand pairs the expected array is rebuilt from shifted rows:
// row r is x << r when y[r] is set, and column i takes bit i of each row, so
// every cell of every column, zero padding included, is compared (45 checks
// per operand pair). The test also checks that the columns, weighted by 2^i,
// add up to x * y.
module tb_pp_gen;
  import wtm_pkg::*;

  logic [OPW-1:0]           x, y;
  logic [NCOL-1:0][OPW-1:0] cols;
  int unsigned checks = 0;
  int unsigned failures = 0;

  pp_gen dut (.x(x), .y(y), .cols(cols));

  initial begin
    for (int vx = 0; vx < 32; vx++) begin
      for (int vy = 0; vy < 32; vy++) begin
        int unsigned total;
        x = OPW'(vx);
        y = OPW'(vy);
        #1;
        total = 0;
        for (int r = 0; r < OPW; r++) begin
          logic [15:0] row;
          row = y[r] ? (16'(vx) << r) : 16'd0;
          for (int i = 0; i < NCOL; i++) begin
            checks++;
            if (cols[i][r] !== row[i]) begin
              failures++;
              $display("FAIL x=%0d y=%0d column %0d row %0d: %0d", vx, vy, i, r, cols[i][r]);
            end
            total += int'(cols[i][r]) << i;
          end
        end
        checks++;
        if (total != vx * vy) begin
          failures++;
          $display("FAIL x=%0d y=%0d: columns add to %0d", vx, vy, total);
        end
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
