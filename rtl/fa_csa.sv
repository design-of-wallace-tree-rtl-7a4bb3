// fa_csa: conventional one-bit full adder, used as the carry save adder (CSA)
// cell of the Wallace tree multiplier.
//
// sum   = a ^ b ^ c
// carry = a&b | b&c | a&c
// The carry is formed as (a ^ b)&c | a&b, which reuses the first XOR and so
// needs exactly two XOR, two AND and one OR gate, the gate budget the design
// gives for this cell. The cell is purely combinational; its ports are named
// after the cell symbol (a, b, c in; cout and sum out).
module fa_csa (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic cout
);

  logic ab_x;  // first XOR stage, shared by sum and carry

  always_comb begin
    ab_x = a ^ b;
    sum  = ab_x ^ c;
    cout = (ab_x & c) | (a & b);
  end

endmodule
