// wt5: five-input Wallace tree, a 5:3 compressor made of three full adders
// in three stages (one adder per stage).
//
//   stage 1: adder 1 adds inputs a[2], a[1], a[0]
//   stage 2: adder 2 adds a[4], a[3] and the sum of adder 1
//   stage 3: adder 3 adds a constant 0 and the carries of adders 1 and 2
// The sum of adder 2 (weight 1), and the sum (weight 2) and carry (weight 4)
// of adder 3 form s, the number of ones among the five inputs, as a 3-bit
// binary count. The stage structure, the inputs of each adder and the
// constant 0 follow the design; which input of a cell each signal takes, and
// that a[0] is the partial product of the lowest row, are this design's
// choice. FA_STYLE selects the full-adder cell (conventional or multiplexer).
// Purely combinational.
module wt5
  import wtm_pkg::*;
#(
  parameter fa_style_e FA_STYLE = FA_CSA
) (
  input  logic [4:0] a,  // five bits of equal weight
  output logic [2:0] s   // count of ones in a: s[0] weight 1 .. s[2] weight 4
);

  logic s1, c1;  // stage 1 sum and carry
  logic s2, c2;  // stage 2 sum and carry
  logic s3, c3;  // stage 3 sum and carry

  fa_cell #(.FA_STYLE(FA_STYLE)) u_fa1 (.a(a[2]), .b(a[1]), .c(a[0]), .sum(s1), .cout(c1));
  fa_cell #(.FA_STYLE(FA_STYLE)) u_fa2 (.a(a[4]), .b(a[3]), .c(s1),   .sum(s2), .cout(c2));
  fa_cell #(.FA_STYLE(FA_STYLE)) u_fa3 (.a(1'b0), .b(c1),   .c(c2),   .sum(s3), .cout(c3));

  assign s = {c3, s3, s2};

endmodule
