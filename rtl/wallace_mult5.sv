// wallace_mult5: 5x5 unsigned Wallace tree multiplier, three adder stages.
//
// Partial products (pp_gen) are grouped into nine columns of five bits. Stage
// 1 reduces each column i with a five-input Wallace tree (wt5) to a 3-bit
// count w[i] whose bits weigh 2^i, 2^(i+1), 2^(i+2). Every column j >= 1 is
// then left with three bits, w[j][0], w[j-1][1] and w[j-2][2], which stage 2
// adds with one full adder per column (columns 1..9; missing inputs are 0).
// That leaves two bits per column (a stage-2 sum and the stage-2 carry from
// the column below), which stage 3 adds with a chain of nine full adders that
// ripples its carry from column 2 up to column 10; the last carry is bit 11.
// Column 0 (w[0][0]) and column 1 (the stage-2 sum of column 1) need no
// stage-3 adder and are output directly. The largest product, 31*31 = 961,
// is below 2^10, so sum_w[11:10] are always zero.
//
// The instance counts (9 Wallace trees, 9 + 9 full adders), the three
// stages, the rippling carry of stage 3 and the 12-bit result sum_w whose
// two top bits are dropped to give the 10-bit product all follow the design;
// so does the port naming x, y, sum_w. Which stage-2 and stage-3 adder serves
// which column is this design's reading of the block diagram, chosen so that
// the sum of the stage-3 adder of column 9 drives sum_w[9]. FA_STYLE picks
// the full-adder cell used in every Wallace tree and in both adder stages.
// Purely combinational: no clock, the result follows the inputs after the
// propagation delay of the tree and the ripple chain.
module wallace_mult5
  import wtm_pkg::*;
#(
  parameter fa_style_e FA_STYLE = FA_CSA
) (
  input  logic [OPW-1:0]    x,        // multiplicand, unsigned
  input  logic [OPW-1:0]    y,        // multiplier, unsigned
  output logic [RAW_W-1:0]  sum_w,    // raw 12-bit result of the tree
  output logic [PROD_W-1:0] product   // sum_w with its two top bits dropped
);

  logic [NCOL-1:0][OPW-1:0] cols;   // partial product columns
  logic [NCOL-1:0][2:0]     w;      // stage 1 counts
  logic [NCOL-1:0]          s2_s;   // stage 2 sums, adder j in column j+1
  logic [NCOL-1:0]          s2_c;   // stage 2 carries, weight of column j+2
  logic [NCOL-1:0]          s3_s;   // stage 3 sums, adder k in column k+2
  logic [NCOL-1:0]          s3_c;   // stage 3 ripple carries

  pp_gen u_pp (.x(x), .y(y), .cols(cols));

  // Stage 1: one Wallace tree per column.
  for (genvar i = 0; i < NCOL; i++) begin : g_st1
    wt5 #(.FA_STYLE(FA_STYLE)) u_wt (.a(cols[i]), .s(w[i]));
  end

  // Stage 2: adder j sums the three bits of column j+1.
  for (genvar j = 0; j < NCOL; j++) begin : g_st2
    logic in_a, in_c;
    assign in_a = (j + 1 < NCOL) ? w[(j + 1) % NCOL][0] : 1'b0;
    assign in_c = (j >= 1) ? w[(j + NCOL - 1) % NCOL][2] : 1'b0;
    fa_cell #(.FA_STYLE(FA_STYLE)) u_fa (
      .a(in_a), .b(w[j][1]), .c(in_c), .sum(s2_s[j]), .cout(s2_c[j])
    );
  end

  // Stage 3: ripple-carry addition, adder k in column k+2.
  for (genvar k = 0; k < NCOL; k++) begin : g_st3
    logic in_b, in_c;
    assign in_b = (k + 1 < NCOL) ? s2_s[(k + 1) % NCOL] : w[NCOL-1][2];
    assign in_c = (k >= 1) ? s3_c[(k + NCOL - 1) % NCOL] : 1'b0;
    fa_cell #(.FA_STYLE(FA_STYLE)) u_fa (
      .a(s2_c[k]), .b(in_b), .c(in_c), .sum(s3_s[k]), .cout(s3_c[k])
    );
  end

  assign sum_w   = {s3_c[NCOL-1], s3_s, s2_s[0], w[0][0]};
  assign product = sum_w[PROD_W-1:0];

endmodule
