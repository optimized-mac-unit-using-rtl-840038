// cb_mul: 16x16 unsigned counter-based modular Wallace tree multiplier,
// z = a * b, combinational.
//
// The partial products are formed with AND gates and reduced column by
// column by a chain of four 7:3 counter stages (cmwtm_tree; rows 1-7,
// then 8-11, 12-15 and 16, each later stage also taking the three bits of
// the column's weight left by the stage before). The tree's spare inputs
// are tied to zero here. Its three output rows go through a carry-save
// adder to two rows, and a carry look-ahead adder forms the product; this
// pair is the fast adder that ends the chain. Bits above 31 are dropped:
// the product of two 16-bit numbers never reaches them.
// The published diagram fixes the counter chain; the text names the final
// carry-save and carry look-ahead adders. Their insides are this design's.
module cb_mul
  import mac_pkg::*;
(
  input  logic [OP_W-1:0]   a,
  input  logic [OP_W-1:0]   b,
  output logic [PROD_W-1:0] z
);
  localparam int unsigned W = PROD_W;

  logic [W-1:0] r_s, r_c1, r_c2;
  logic [W-1:0] fa_s, fa_c;
  logic         unused_cout;

  cmwtm_tree u_tree (
    .a(a), .b(b), .x1('0), .x2('0), .x3('0),
    .s(r_s), .c1(r_c1), .c2(r_c2)
  );

  // final addition: carry-save adder then carry look-ahead adder
  csa #(.W(W)) u_csa (.x(r_s), .y(r_c1), .z(r_c2), .s(fa_s), .c(fa_c));

  cla #(.W(W)) u_cla (
    .a(fa_s),
    .b({fa_c[W-2:0], 1'b0}),
    .cin(1'b0),
    .s(z),
    .cout(unused_cout)
  );
endmodule
