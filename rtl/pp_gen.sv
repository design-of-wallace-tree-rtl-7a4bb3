// pp_gen: partial product generation for the 5x5 unsigned multiplier.
//
// Row r of the partial product array is the multiplicand x ANDed with bit r
// of the multiplier y and shifted left by r places. Column i collects every
// bit of weight 2^i: cols[i][r] = x[i-r] & y[r] where 0 <= i-r <= 4, else 0.
// Indexing each column by its row number pads it to five bits with zeros:
// below the partial product bits in columns 0..3 (four, three, two, one zero),
// none in column 4, above them in columns 5..8 (one, two, three, four zeros),
// the arrangement the design prescribes. The 45 bits are the inputs of the
// nine five-input Wallace trees. Purely combinational (25 AND gates).
module pp_gen
  import wtm_pkg::*;
(
  input  logic [OPW-1:0]             x,     // multiplicand
  input  logic [OPW-1:0]             y,     // multiplier
  output logic [NCOL-1:0][OPW-1:0]   cols   // cols[i][r]: column i, row r
);

  always_comb begin
    for (int i = 0; i < NCOL; i++) begin
      for (int r = 0; r < OPW; r++) begin
        if (i - r >= 0 && i - r < OPW) begin
          cols[i][r] = x[i-r] & y[r];
        end else begin
          cols[i][r] = 1'b0;
        end
      end
    end
  end

endmodule
