// mac_pkg: sizes shared by the multiply-accumulate unit.
// The operands are 16 bits and the product and accumulator 32 bits, as on
// the unit's RTL schematic (a[15:0], b[15:0], z[31:0]). The counter-based
// multiplier splits its 16 partial-product rows into groups of 7, 4, 4 and 1,
// one group per 7:3 counter stage; ROWS_S1 is the size of the first group.
package mac_pkg;
  localparam int unsigned OP_W   = 16;       // operand width
  localparam int unsigned PROD_W = 2 * OP_W; // product and accumulator width
  localparam int unsigned ROWS_S1 = 7;       // rows 1-7 enter counter stage 1
endpackage
