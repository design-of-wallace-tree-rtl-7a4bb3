// wtm_pkg: shared sizes and the adder-cell selector for the 5x5 Wallace tree
// multiplier.
//
// The multiplier exists in two versions that differ only in the full-adder
// cell used everywhere in the tree: the conventional gate-level full adder
// (called the carry save adder cell, CSA) and the full adder made of one XOR
// gate and two 2:1 multiplexers (MUX FA). fa_style_e picks one of them.
// Operand width, column count and output width are those of the 5x5 design:
// five partial products spread over nine columns, and a 12-bit raw result
// whose two top bits are always zero, leaving a 10-bit product.
package wtm_pkg;

  typedef enum logic {
    FA_CSA = 1'b0,  // conventional full adder: 2 XOR, 2 AND, 1 OR
    FA_MUX = 1'b1   // XOR-selected pair of 2:1 multiplexers
  } fa_style_e;

  localparam int unsigned OPW    = 5;            // operand width
  localparam int unsigned NCOL   = 2 * OPW - 1;  // partial product columns (9)
  localparam int unsigned RAW_W  = 12;           // width of the raw tree result
  localparam int unsigned PROD_W = 2 * OPW;      // width of the product (10)

  // One column of partial product bits as fed to a five-input Wallace tree.
  typedef logic [OPW-1:0] column_t;

endpackage
