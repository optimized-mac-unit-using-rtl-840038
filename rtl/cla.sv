// cla: W-bit carry look-ahead adder, s + 2^W*cout = a + b + cin.
// Bits are grouped by four. Inside a group every carry is computed directly
// from the bit generate (a&b) and propagate (a^b) signals and the group's
// carry in, without rippling; group carries pass from group to group.
// W must be a multiple of 4. Combinational.
// A carry look-ahead adder is what the published description names; the
// 4-bit grouping is this design's choice.
module cla #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned GROUPS = W / 4;

  logic [W-1:0] g, p;
  logic [W:0]   c;

  assign g = a & b;
  assign p = a ^ b;

  // carry out of the lowest j bits of a group, from their generate and
  // propagate bits and the group's carry in, as one sum of products
  function automatic logic lookahead(input logic [3:0] gg, input logic [3:0] pp,
                                     input logic ci, input int unsigned j);
    logic term;
    lookahead = ci;
    for (int unsigned m = 0; m < j; m++) lookahead &= pp[m];
    for (int unsigned m = 0; m < j; m++) begin
      term = gg[m];
      for (int unsigned q = m + 1; q < j; q++) term &= pp[q];
      lookahead |= term;
    end
  endfunction

  for (genvar grp = 0; grp < GROUPS; grp++) begin : g_grp
    logic       ci;  // carry into the group
    logic [4:1] co;  // carries out of its lowest 1..4 bits
    if (grp == 0) begin : g_first
      assign ci = cin;
    end else begin : g_next
      assign ci = g_grp[grp-1].co[4];
    end
    for (genvar j = 1; j <= 4; j++) begin : g_carry
      assign co[j] = lookahead(g[grp*4 +: 4], p[grp*4 +: 4], ci, j);
    end
    assign c[grp*4 +: 4] = {co[3:1], ci};
  end
  assign c[W] = g_grp[GROUPS-1].co[4];

  assign s    = p ^ c[W-1:0];
  assign cout = c[W];
endmodule
