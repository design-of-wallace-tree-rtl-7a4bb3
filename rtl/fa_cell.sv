// fa_cell: full adder whose implementation is chosen by a parameter.
//
// FA_STYLE = FA_CSA instantiates the conventional full adder (fa_csa),
// FA_STYLE = FA_MUX the multiplexer full adder (fa_mux). Both compute the same
// sum and carry; only their gate structure, and so their area, power and
// delay, differ. Combinational, same ports as the two cells.
module fa_cell
  import wtm_pkg::*;
#(
  parameter fa_style_e FA_STYLE = FA_CSA
) (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic cout
);

  if (FA_STYLE == FA_MUX) begin : g_mux
    fa_mux u_fa (.a(a), .b(b), .c(c), .sum(sum), .cout(cout));
  end else begin : g_csa
    fa_csa u_fa (.a(a), .b(b), .c(c), .sum(sum), .cout(cout));
  end

endmodule
