// wtm_top: the two versions of the 5x5 Wallace tree multiplier side by side.
//
// Both multiply the same unsigned operands x and y. u_csa is built entirely
// from conventional full adders (carry save adder cells), u_mux entirely from
// multiplexer full adders; the two are functionally identical and exist to be
// compared in area, power and delay, the version with conventional cells being
// the smaller, lower-power and faster one. Each brings out its raw 12-bit
// tree result and its 10-bit product. Purely combinational.
module wtm_top
  import wtm_pkg::*;
(
  input  logic [OPW-1:0]    x,
  input  logic [OPW-1:0]    y,
  output logic [RAW_W-1:0]  sum_w_csa,
  output logic [PROD_W-1:0] product_csa,
  output logic [RAW_W-1:0]  sum_w_mux,
  output logic [PROD_W-1:0] product_mux
);

  wallace_mult5 #(.FA_STYLE(FA_CSA)) u_csa (
    .x(x), .y(y), .sum_w(sum_w_csa), .product(product_csa)
  );

  wallace_mult5 #(.FA_STYLE(FA_MUX)) u_mux (
    .x(x), .y(y), .sum_w(sum_w_mux), .product(product_mux)
  );

endmodule
