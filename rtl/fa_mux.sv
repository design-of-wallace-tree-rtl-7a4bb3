// fa_mux: one-bit full adder built from one XOR gate and two 2:1 multiplexers
// (the MUX FA cell).
//
// The XOR of b and c drives the select line of both multiplexers:
//   select = 0 (b == c): sum = a,  carry = b
//   select = 1 (b != c): sum = ~a, carry = a
// which gives sum = a ^ b ^ c and carry = majority(a, b, c). The select
// behaviour is the design's; the cell is combinational, ports as in fa_csa.
module fa_mux (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic cout
);

  logic sel;  // XOR of b and c, select line of both multiplexers

  always_comb begin
    sel  = b ^ c;
    sum  = sel ? ~a : a;
    cout = sel ? a : b;
  end

endmodule
