// csa: W-bit carry-save adder. Reduces three rows x, y, z to a sum row s and
// a carry row c without propagating carries: bit k of the result is
// s[k] + 2*c[k]. In other words x + y + z = s + (c << 1). One row of modified
// full adders, combinational.
// The published description names a carry-save adder only; building it
// from the multiplexer-based full adder is this design's choice.
module csa #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c   // c[k] has weight 2^(k+1)
);
  for (genvar k = 0; k < W; k++) begin : g_bit
    mfa u_fa (.a(x[k]), .b(y[k]), .c(z[k]), .sum(s[k]), .carry(c[k]));
  end
endmodule
