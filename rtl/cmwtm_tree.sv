// cmwtm_tree: partial-product generation and 7:3 counter reduction of the
// 16x16 counter-based modular Wallace tree, without the final addition.
//
// Row r of the partial-product matrix is (a & {16{b[r]}}) << r, zero
// padded to 32 bits. Every column runs through a chain of four 7:3
// counters:
//   stage 1 counts rows 1-7;
//   stage 2 counts rows 8-11 plus the three bits of the column's weight
//           that stage 1 left (its sum in this column, its c1 from the
//           column below, its c2 from two columns below);
//   stage 3 does the same with rows 12-15 and stage 2;
//   stage 4 counts row 16, the three bits left by stage 3, and three
//           further rows x1, x2, x3 that enter where a plain multiplier
//           feeds zeros.
// The result is three rows whose sum (mod 2^32) is a*b + x1 + x2 + x3:
// s (weight 1), c1 already shifted left by one and c2 shifted left by two.
// With x1..x3 at zero it is the product; with the rows of a running sum
// fed back, the tree adds the product to that sum without any carry
// propagation. Combinational; no carry ripples along a stage.
// The row grouping 7/4/4/1 and the four counter stages follow the published
// block diagram; using the three zero inputs of stage 4 for extra rows is
// this design's choice.
module cmwtm_tree
  import mac_pkg::*;
(
  input  logic [OP_W-1:0]   a,
  input  logic [OP_W-1:0]   b,
  input  logic [PROD_W-1:0] x1,
  input  logic [PROD_W-1:0] x2,
  input  logic [PROD_W-1:0] x3,
  output logic [PROD_W-1:0] s,
  output logic [PROD_W-1:0] c1,
  output logic [PROD_W-1:0] c2
);
  localparam int unsigned W = PROD_W;

  // partial-product matrix, one 32-bit row per multiplier bit
  logic [W-1:0] pp [OP_W];
  for (genvar r = 0; r < OP_W; r++) begin : g_pp
    assign pp[r] = W'(a & {OP_W{b[r]}}) << r;
  end

  // outputs of the four counter stages, one bit per column
  logic [W-1:0] st_s  [4];
  logic [W-1:0] st_c1 [4];
  logic [W-1:0] st_c2 [4];

  // bits of the column's weight that a stage passes to the next one
  function automatic logic [2:0] carried(input logic [W-1:0] ss, input logic [W-1:0] cc1,
                                         input logic [W-1:0] cc2, input int unsigned col);
    carried[0] = ss[col];
    carried[1] = (col >= 1) ? cc1[col-1] : 1'b0;
    carried[2] = (col >= 2) ? cc2[col-2] : 1'b0;
  endfunction

  for (genvar col = 0; col < W; col++) begin : g_col
    logic [6:0] in1, in2, in3, in4;

    always_comb begin
      for (int unsigned r = 0; r < ROWS_S1; r++) in1[r] = pp[r][col];
      in2[3:0] = {pp[10][col], pp[9][col], pp[8][col], pp[7][col]};
      in2[6:4] = carried(st_s[0], st_c1[0], st_c2[0], col);
      in3[3:0] = {pp[14][col], pp[13][col], pp[12][col], pp[11][col]};
      in3[6:4] = carried(st_s[1], st_c1[1], st_c2[1], col);
      in4[3:0] = {x3[col], x2[col], x1[col], pp[15][col]};
      in4[6:4] = carried(st_s[2], st_c1[2], st_c2[2], col);
    end

    counter73 u_st1 (.i(in1), .sum(st_s[0][col]), .c1(st_c1[0][col]), .c2(st_c2[0][col]));
    counter73 u_st2 (.i(in2), .sum(st_s[1][col]), .c1(st_c1[1][col]), .c2(st_c2[1][col]));
    counter73 u_st3 (.i(in3), .sum(st_s[2][col]), .c1(st_c1[2][col]), .c2(st_c2[2][col]));
    counter73 u_st4 (.i(in4), .sum(st_s[3][col]), .c1(st_c1[3][col]), .c2(st_c2[3][col]));
  end

  assign s  = st_s[3];
  assign c1 = {st_c1[3][W-2:0], 1'b0};
  assign c2 = {st_c2[3][W-3:0], 2'b00};
endmodule
